// tb_imm_genie: checks the immediate generator on random instruction words
// of every opcode: C-type words give IR[13:6], all others IR[15:6], both
// zero-extended to 16 bits.
module tb_imm_genie;
  logic [15:0] ir, imm;
  imm_genie dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e;
    for (int n = 0; n < 2000; n++) begin
      ir = 16'($urandom);
      if (n < 8) ir = 16'hFFF8 | 16'(n);   // all-ones fields, each opcode
      #1;
      e = (ir[2:0] == 3'b001) ? 16'(ir[13:6]) : 16'(ir[15:6]);
      checks++;
      if (imm !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: ir %h imm %h expected %h", ir, imm, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
