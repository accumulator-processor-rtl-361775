// mem_wrapper: the memory together with the two muxes in front of it.
//
// MemIn selects the address: 0 = PC (instruction fetch), 1 = OUT (data
// access, the comparison slot and the stack read of pop), 2 = SP (the stack
// write of push). DataSRC selects the write data: 0 = REG (sw), 1 = OUT (the
// return address written by push). Both mux orders follow the processor's
// control-signal list. Read data is combinational; a write takes effect at
// the next rising edge. The ld_* port passes through to the memory's second
// port (program load and result inspection, this design's addition).
module mem_wrapper
  import acc_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 10
) (
  input  logic            clk,
  input  memin_e          mem_in,
  input  datasrc_e        data_src,
  input  logic            mem_write,
  input  logic [XLEN-1:0] pc_q,
  input  logic [XLEN-1:0] out_q,
  input  logic [XLEN-1:0] sp_q,
  input  logic [XLEN-1:0] reg_q,
  output logic [XLEN-1:0] mem_data,
  input  logic [XLEN-1:0] ld_addr,
  input  logic            ld_we,
  input  logic [XLEN-1:0] ld_wdata,
  output logic [XLEN-1:0] ld_rdata
);

  logic [XLEN-1:0] addr, wdata;

  always_comb begin
    unique case (mem_in)
      MEMIN_PC:  addr = pc_q;
      MEMIN_OUT: addr = out_q;
      default:   addr = sp_q;   // MEMIN_SP (code 3 unused)
    endcase
    wdata = (data_src == DS_OUT) ? out_q : reg_q;
  end

  acc_memory #(.DEPTH_LOG2(DEPTH_LOG2)) u_mem (
    .clk, .addr, .we(mem_write), .wdata, .rdata(mem_data),
    .ld_addr, .ld_we, .ld_wdata, .ld_rdata
  );

endmodule
