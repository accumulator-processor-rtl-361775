// ir_reg: instruction register.
//
// Captures the memory read data at the rising edge when IRWrite is 1
// (the Fetch state) and splits it into the fields the rest of the processor
// uses: opcode IR[2:0] and func3 IR[5:3] to the control unit, the whole word
// to the Immediate Genie. Field positions follow the processor's instruction
// formats. Synchronous reset to 0 (the encoding of "add 0").
module ir_reg
  import acc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ir_write,
  input  logic [XLEN-1:0] mem_data,
  output logic [XLEN-1:0] ir,
  output logic [2:0]      opcode,
  output logic [2:0]      func3
);

  always_ff @(posedge clk) begin
    if (rst)           ir <= '0;
    else if (ir_write) ir <= mem_data;
  end

  assign opcode = ir[2:0];
  assign func3  = ir[5:3];

endmodule
