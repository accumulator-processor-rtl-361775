// tb_acc_control: checks the control unit's state paths and control bits.
//
// For each of the 13 instructions (and one undefined encoding) the
// testbench resets the unit, holds that opcode/func3 at its inputs and
// follows it from Fetch back to Fetch. It compares the state sequence and
// the number of clocks with the expected path, and in chosen states the
// control bits with the values listed for that state in the control table
// (written out here independently of the RTL).
module tb_acc_control;
  import acc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] opcode, func3;
  ctrl_t ctrl;
  state_e state;

  acc_control dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // control bits expected in a state, as one packed word for comparison
  function automatic ctrl_t expect_ctrl(input state_e s);
    ctrl_t c = CTRL_IDLE;
    case (s)
      S_FETCH:  begin c.mem_in = MEMIN_PC; c.ir_write = 1; c.a_sel = A_PC; c.b_sel = B_TWO;
                      c.pc_source = PCS_ALU; c.pc_write = 1; end
      S_DECODE: begin c.a_sel = A_ZERO; c.b_sel = B_IMM; c.out_write = 1; end
      S_ADDSUB_MEM: c.mem_in = MEMIN_OUT;
      S_ADD:    begin c.b_sel = B_MDR; c.reg_write = 1; end
      S_SUB:    begin c.b_sel = B_MDR; c.alu_op = ALU_SUB; c.reg_write = 1; end
      S_LW:     begin c.mem_in = MEMIN_OUT; c.reg_write = 1; c.reg_source = RS_MEM; end
      S_SW:     begin c.mem_in = MEMIN_OUT; c.mem_write = 1; end
      S_JUMP:   begin c.a_sel = A_ZERO; c.b_sel = B_IMM; c.pc_source = PCS_ALU; c.pc_write = 1; end
      S_ADDI:   begin c.b_sel = B_IMM; c.reg_write = 1; end
      S_SUBI:   begin c.b_sel = B_IMM; c.alu_op = ALU_SUB; c.reg_write = 1; end
      S_COMP_ADDR: begin c.a_sel = A_ZERO; c.b_sel = B_TWO; c.out_write = 1; end
      S_COMP_MEM:  begin c.mem_in = MEMIN_OUT; c.a_sel = A_PC; c.b_sel = B_IMM; c.out_write = 1; end
      S_BEQ, S_BGE, S_BLT, S_BNE: begin
        c.b_sel = B_MDR; c.alu_op = ALU_SUB; c.is_branch = 1; c.pc_source = PCS_OUT;
        c.branch_op = (s == S_BEQ) ? BR_EQ : (s == S_BGE) ? BR_GE : (s == S_BLT) ? BR_LT : BR_NE;
      end
      S_COMPARED:   begin c.a_sel = A_PC; c.b_sel = B_IMM; c.pc_source = PCS_ALU; end
      S_PC_INC:     begin c.a_sel = A_PC; c.b_sel = B_TWO; c.out_write = 1; end
      S_PUSH_STACK: begin c.data_src = DS_OUT; c.mem_in = MEMIN_SP; c.mem_write = 1; end
      S_PUSH:       begin c.a_sel = A_SP; c.b_sel = B_TWO; c.alu_op = ALU_SUB; c.sp_write = 1; end
      S_SP_INC:     begin c.a_sel = A_SP; c.b_sel = B_TWO; c.out_write = 1; c.sp_write = 1; end
      S_POP:        begin c.pc_source = PCS_MEM; c.pc_write = 1; c.mem_in = MEMIN_OUT; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic run_path(input logic [2:0] op, input logic [2:0] f, input state_e path[$], input string name);
    rst = 1; opcode = op; func3 = f;
    @(negedge clk); @(negedge clk);
    check(state == S_RESET && ctrl == CTRL_IDLE, {name, ": reset state"});
    rst = 0;
    @(negedge clk);
    foreach (path[k]) begin
      check(state == path[k], $sformatf("%s: step %0d is %s, expected %s", name, k, state.name(), path[k].name()));
      check(ctrl == expect_ctrl(path[k]), $sformatf("%s: control bits in %s", name, path[k].name()));
      @(negedge clk);
    end
    check(state == S_FETCH, $sformatf("%s: back in Fetch after %0d clocks", name, path.size()));
  endtask

  initial begin
    opcode = 0; func3 = 0;
    run_path(OP_R, F_ADD,  '{S_FETCH, S_DECODE, S_ADDSUB_MEM, S_ADD}, "add");
    run_path(OP_R, F_SUB,  '{S_FETCH, S_DECODE, S_ADDSUB_MEM, S_SUB}, "sub");
    run_path(OP_R, F_LW,   '{S_FETCH, S_DECODE, S_LW}, "lw");
    run_path(OP_R, F_SW,   '{S_FETCH, S_DECODE, S_SW}, "sw");
    run_path(OP_C, F_BEQ,  '{S_FETCH, S_DECODE, S_COMP_ADDR, S_COMP_MEM, S_BEQ, S_COMPARED}, "beq");
    run_path(OP_C, F_BNE,  '{S_FETCH, S_DECODE, S_COMP_ADDR, S_COMP_MEM, S_BNE, S_COMPARED}, "bne");
    run_path(OP_C, F_BLT,  '{S_FETCH, S_DECODE, S_COMP_ADDR, S_COMP_MEM, S_BLT, S_COMPARED}, "blt");
    run_path(OP_C, F_BGE,  '{S_FETCH, S_DECODE, S_COMP_ADDR, S_COMP_MEM, S_BGE, S_COMPARED}, "bge");
    run_path(OP_I, F_ADDI, '{S_FETCH, S_DECODE, S_ADDI}, "addi");
    run_path(OP_I, F_SUBI, '{S_FETCH, S_DECODE, S_SUBI}, "subi");
    run_path(OP_J, F_JAL,  '{S_FETCH, S_DECODE, S_JUMP}, "jal");
    run_path(OP_P, F_PUSH, '{S_FETCH, S_DECODE, S_PC_INC, S_PUSH_STACK, S_PUSH}, "push");
    run_path(OP_P, F_POP,  '{S_FETCH, S_DECODE, S_SP_INC, S_POP}, "pop");
    run_path(3'b111, 3'd0, '{S_FETCH, S_DECODE}, "undefined");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
