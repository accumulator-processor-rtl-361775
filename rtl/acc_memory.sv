// acc_memory: unified instruction and data memory of the accumulator
// processor.
//
// DEPTH_LOG2 = 10 gives 1024 words of 16 bits, indexed directly by the low
// address bits: the processor steps its PC by 2, so programs sit at even
// addresses and odd words are left unused, the layout of the processor's
// program images. Address 0 is hard-wired to the value 0 (reads return 0,
// writes are dropped). The memory is built from flip-flops: reads are
// asynchronous (the data of the addressed word is valid in the same cycle),
// writes happen at the rising clock edge when we is high.
//
// A second port (ld_*) reads and writes the same array. It is this design's
// own addition, used to load a program and to inspect results; it writes
// only in cycles in which the processor port does not write. There is
// no reset: contents are whatever was written.
module acc_memory
  import acc_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 10
) (
  input  logic            clk,
  // processor port
  input  logic [XLEN-1:0] addr,
  input  logic            we,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata,
  // load / inspect port
  input  logic [XLEN-1:0] ld_addr,
  input  logic            ld_we,
  input  logic [XLEN-1:0] ld_wdata,
  output logic [XLEN-1:0] ld_rdata
);

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;

  logic [XLEN-1:0] mem [DEPTH];

  logic [DEPTH_LOG2-1:0] idx, ld_idx;
  assign idx    = addr[DEPTH_LOG2-1:0];
  assign ld_idx = ld_addr[DEPTH_LOG2-1:0];

  always_ff @(posedge clk) begin
    if (we) begin
      if (idx != '0) mem[idx] <= wdata;
    end else if (ld_we && ld_idx != '0) begin
      mem[ld_idx] <= ld_wdata;
    end
  end

  assign rdata    = (idx    == '0) ? '0 : mem[idx];
  assign ld_rdata = (ld_idx == '0) ? '0 : mem[ld_idx];

endmodule
