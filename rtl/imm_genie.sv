// imm_genie: immediate generator ("Immediate Genie") of the accumulator
// processor.
//
// Picks the immediate field out of the instruction word and zero-extends it
// to 16 bits; the processor never sign-extends. For C-type branches
// (opcode 001) the field is the 8-bit PC-relative offset IR[13:6]; for every
// other instruction it is the 10-bit address/immediate IR[15:6]. Both field
// positions and the zero extension follow the processor's instruction formats
// and its register-transfer description. Purely combinational.
module imm_genie
  import acc_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  output logic [XLEN-1:0] imm
);

  always_comb begin
    if (ir[2:0] == OP_C) imm = {8'd0, ir[13:6]};
    else                 imm = {6'd0, ir[15:6]};
  end

endmodule
