// tb_acc_alu: checks the ALU and its operand muxes with random operands.
// Every A source, B source, ALUOp and BranchOp value is applied; the
// expected sum/difference and branch condition are computed in the
// testbench. Directed cases cover wrap-around and signed comparison.
module tb_acc_alu;
  import acc_pkg::*;

  asel_e a_sel; bsel_e b_sel; aluop_e alu_op; brop_e branch_op;
  logic [15:0] reg_q, pc_q, sp_q, imm, mdr_q, result;
  logic signage;

  acc_alu dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply_and_check();
    logic [15:0] a, b, r;
    bit c;
    #1;
    case (a_sel) A_REG: a = reg_q; A_PC: a = pc_q; A_ZERO: a = 0; default: a = sp_q; endcase
    case (b_sel) B_TWO: b = 2; B_IMM: b = imm; default: b = mdr_q; endcase
    r = (alu_op == ALU_SUB) ? 16'(a - b) : 16'(a + b);
    case (branch_op)
      BR_EQ: c = (a == b);
      BR_NE: c = (a != b);
      BR_LT: c = (int'($signed(a)) < int'($signed(b)));
      default: c = (int'($signed(a)) >= int'($signed(b)));
    endcase
    check(result == r, $sformatf("a_sel %0d b_sel %0d op %0d: %h expected %h", a_sel, b_sel, alu_op, result, r));
    check(signage == c, $sformatf("branch %0d on %h,%h: %0b expected %0b", branch_op, a, b, signage, c));
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      reg_q = 16'($urandom); pc_q = 16'($urandom); sp_q = 16'($urandom);
      imm = 16'($urandom_range(0, 1023)); mdr_q = 16'($urandom);
      if (n % 5 == 0) mdr_q = reg_q;   // make equality happen
      for (int as = 0; as < 4; as++)
        for (int bs = 0; bs < 3; bs++)
          for (int op = 0; op < 2; op++)
            for (int br = 0; br < 4; br++) begin
              a_sel = asel_e'(as); b_sel = bsel_e'(bs); alu_op = aluop_e'(op); branch_op = brop_e'(br);
              apply_and_check();
            end
    end
    // directed: wrap-around and signed compare
    a_sel = A_REG; b_sel = B_MDR; reg_q = 16'hFFFF; mdr_q = 16'h0001;
    alu_op = ALU_ADD; branch_op = BR_LT; #1;
    check(result == 16'h0000, "0xFFFF + 1 wraps to 0");
    check(signage == 1'b1, "-1 < 1 (signed)");
    reg_q = 16'h0000; mdr_q = 16'h0002; alu_op = ALU_SUB; branch_op = BR_GE; #1;
    check(result == 16'hFFFE, "0 - 2 = 0xFFFE");
    check(signage == 1'b0, "0 >= 2 is false");
    reg_q = 16'd7; mdr_q = 16'd7; branch_op = BR_GE; #1;
    check(signage == 1'b1, "7 >= 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
