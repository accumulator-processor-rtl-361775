// word_reg: a data register with write enable and synchronous reset, used
// for three of the processor's registers:
//   OUT  holds the ALU result (written when OutWrite is 1); it supplies data
//        addresses, branch targets and the return address of push;
//   SP   the stack pointer (written when SPWrite is 1), reset to the top
//        stack slot;
//   MDR  the memory data register, which has no write control in the
//        processor's control list and so loads the memory read data on
//        every clock.
// d is captured at the rising edge when en is 1; rst loads RESET_VAL.
module word_reg
  import acc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_VAL = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [XLEN-1:0] d,
  output logic [XLEN-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= d;
  end

endmodule
