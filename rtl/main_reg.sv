// main_reg: REG, the accumulator of the processor.
//
// RegSource picks the value written: 0 = ALU result, 1 = memory read data
// (lw). REG is written at the rising edge when RegWrite is 1. The
// processor's input port enters here: while rst is high REG loads io_in, so
// a program starts with its argument in the accumulator and can store it
// with sw. The processor's output port is REG itself. The mux and write
// enable follow the processor's datapath; loading the input during reset is
// this design's reading of how the input reaches the register.
module main_reg
  import acc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] io_in,
  input  regsrc_e         reg_source,
  input  logic            reg_write,
  input  logic [XLEN-1:0] alu_result,
  input  logic [XLEN-1:0] mem_data,
  output logic [XLEN-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)            q <= io_in;
    else if (reg_write) q <= (reg_source == RS_MEM) ? mem_data : alu_result;
  end

endmodule
