// acc_cpu: 16-bit multicycle accumulator processor (top level).
//
// One architectural register, REG, holds every operand and result; the
// other operand of add/sub/lw/sw comes from memory at a 10-bit direct
// address, and of addi/subi from a 10-bit zero-extended immediate. Branches
// compare REG with the word at address 0x0002 and jump forward by an 8-bit
// offset from the next instruction; jal jumps to a 10-bit absolute address;
// push/pop save and restore a return address on a stack that grows down.
// Around REG the datapath has PC, SP, IR, OUT (ALU result) and MDR (memory
// data), one ALU with an A mux (REG, PC, 0, SP) and a B mux (2, immediate,
// MDR), and a single memory for code and data. The control unit is a Moore
// state machine taking 3 to 6 clocks per instruction (see acc_control).
//
// Ports:
//   clk, rst          rising-edge clock, synchronous active-high reset; hold
//                     rst for at least one clock
//   io_in             input argument, loaded into REG while rst is high
//   io_out            output: the current value of REG
//   ld_*              memory load/inspect port (write at the clock edge, read
//                     combinationally); meant for use while rst is high
//   pc, state         observation of the program counter and control state
// Parameters: DEPTH_LOG2 (memory words = 2**DEPTH_LOG2, 10 as in the
// processor), SP_INIT (first stack slot) and RESET_PC.
// The blocks, muxes and control bits follow the processor's datapath diagram;
// the reset values, the input loading and the ld_* port are this design's.
module acc_cpu
  import acc_pkg::*;
#(
  parameter int unsigned     DEPTH_LOG2 = 10,
  parameter logic [XLEN-1:0] SP_INIT    = 16'h03FE,
  parameter logic [XLEN-1:0] RESET_PC   = 16'h0000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] io_in,
  output logic [XLEN-1:0] io_out,
  input  logic [XLEN-1:0] ld_addr,
  input  logic            ld_we,
  input  logic [XLEN-1:0] ld_wdata,
  output logic [XLEN-1:0] ld_rdata,
  output logic [XLEN-1:0] pc,
  output state_e          state
);

  ctrl_t           ctrl;
  logic [2:0]      opcode, func3;
  logic [XLEN-1:0] ir, imm, reg_q, pc_q, sp_q, out_q, mdr_q, mem_data, alu_result;
  logic            signage;

  acc_control u_ctrl (
    .clk, .rst, .opcode, .func3, .ctrl, .state
  );

  mem_wrapper #(.DEPTH_LOG2(DEPTH_LOG2)) u_mem (
    .clk,
    .mem_in(ctrl.mem_in), .data_src(ctrl.data_src), .mem_write(ctrl.mem_write),
    .pc_q, .out_q, .sp_q, .reg_q, .mem_data,
    .ld_addr, .ld_we, .ld_wdata, .ld_rdata
  );

  ir_reg u_ir (
    .clk, .rst, .ir_write(ctrl.ir_write), .mem_data, .ir, .opcode, .func3
  );

  imm_genie u_imm (.ir, .imm);

  acc_alu u_alu (
    .a_sel(ctrl.a_sel), .b_sel(ctrl.b_sel), .alu_op(ctrl.alu_op),
    .branch_op(ctrl.branch_op),
    .reg_q, .pc_q, .sp_q, .imm, .mdr_q,
    .result(alu_result), .signage
  );

  main_reg u_reg (
    .clk, .rst, .io_in, .reg_source(ctrl.reg_source), .reg_write(ctrl.reg_write),
    .alu_result, .mem_data, .q(reg_q)
  );

  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .pc_source(ctrl.pc_source), .pc_write(ctrl.pc_write),
    .is_branch(ctrl.is_branch), .signage,
    .out_q, .alu_result, .mem_data, .q(pc_q)
  );

  word_reg #(.RESET_VAL(SP_INIT)) u_sp (
    .clk, .rst, .en(ctrl.sp_write), .d(alu_result), .q(sp_q)
  );

  word_reg u_out (
    .clk, .rst, .en(ctrl.out_write), .d(alu_result), .q(out_q)
  );

  word_reg u_mdr (
    .clk, .rst, .en(1'b1), .d(mem_data), .q(mdr_q)
  );

  assign io_out = reg_q;
  assign pc     = pc_q;

  // A write to memory and a write to PC never come from the same state.
  assert property (@(posedge clk) disable iff (rst) !(ctrl.mem_write && ctrl.pc_write));

endmodule
