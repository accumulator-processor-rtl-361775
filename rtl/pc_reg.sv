// pc_reg: program counter.
//
// PCSource picks the next PC: 0 = OUT (taken branch target), 1 = ALU result
// (PC+2 in fetch, the jal target), 2 = memory read data (return address in
// pop). PC is written at the rising edge when PCWrite is 1, or when IsBranch
// and the ALU's Signage are both 1 (a taken branch). The three sources and
// the IsBranch-and-Signage rule follow the processor's datapath; combining
// that with PCWrite by OR is this design's reading. Synchronous reset to
// RESET_PC (0: execution runs through the zeroed data words, which decode
// as "add 0", and reaches the program at 0x0040).
module pc_reg
  import acc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  pcsrc_e          pc_source,
  input  logic            pc_write,
  input  logic            is_branch,
  input  logic            signage,
  input  logic [XLEN-1:0] out_q,
  input  logic [XLEN-1:0] alu_result,
  input  logic [XLEN-1:0] mem_data,
  output logic [XLEN-1:0] q
);

  logic            load;
  logic [XLEN-1:0] d;

  always_comb begin
    load = pc_write | (is_branch & signage);
    unique case (pc_source)
      PCS_OUT: d = out_q;
      PCS_ALU: d = alu_result;
      default: d = mem_data;   // PCS_MEM (code 3 unused)
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       q <= RESET_PC;
    else if (load) q <= d;
  end

endmodule
