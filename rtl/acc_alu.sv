// acc_alu: ALU of the accumulator processor, with its two operand muxes.
//
// A is chosen from REG, PC, the constant 0 and SP; B from the constant 2,
// the Immediate Genie output and MDR (select codes as in acc_pkg). ALUOp
// chooses A+B or A-B (16-bit, wrapping). Signage is the branch condition
// selected by BranchOp, evaluated on A against B: BEQ A==B, BNE A!=B,
// BLT A<B, BGE A>=B. The operand sets, the add/sub choice and the four
// BranchOp conditions follow the processor's datapath and control list;
// treating A and B as signed two's-complement numbers for BLT/BGE is this
// design's choice. Purely combinational.
module acc_alu
  import acc_pkg::*;
(
  input  asel_e           a_sel,
  input  bsel_e           b_sel,
  input  aluop_e          alu_op,
  input  brop_e           branch_op,
  input  logic [XLEN-1:0] reg_q,
  input  logic [XLEN-1:0] pc_q,
  input  logic [XLEN-1:0] sp_q,
  input  logic [XLEN-1:0] imm,
  input  logic [XLEN-1:0] mdr_q,
  output logic [XLEN-1:0] result,
  output logic            signage
);

  logic [XLEN-1:0] a, b;

  always_comb begin
    unique case (a_sel)
      A_REG:   a = reg_q;
      A_PC:    a = pc_q;
      A_ZERO:  a = '0;
      default: a = sp_q;
    endcase
    unique case (b_sel)
      B_TWO:   b = XLEN'(2);
      B_IMM:   b = imm;
      default: b = mdr_q;   // B_MDR (code 3 unused)
    endcase
  end

  always_comb begin
    result = (alu_op == ALU_SUB) ? a - b : a + b;
  end

  always_comb begin
    unique case (branch_op)
      BR_EQ:   signage = (a == b);
      BR_NE:   signage = (a != b);
      BR_LT:   signage = ($signed(a) <  $signed(b));
      default: signage = ($signed(a) >= $signed(b));
    endcase
  end

endmodule
