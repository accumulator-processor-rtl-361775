// tb_word_reg: checks the enabled data register used for OUT, SP and MDR.
// Two instances are tested: one with reset value 0 (OUT, MDR) and one with
// the stack pointer's reset value 0x03FE; each must load d only when en
// is 1.
module tb_word_reg;
  logic clk = 0, rst, en;
  logic [15:0] d, q0, q1;

  word_reg                          u_out (.clk, .rst, .en, .d, .q(q0));
  word_reg #(.RESET_VAL(16'h03FE))  u_sp  (.clk, .rst, .en, .d, .q(q1));
  always #5 clk = ~clk;

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

  initial begin
    logic [15:0] model;
    rst = 1; en = 1; d = 16'hAAAA;
    @(negedge clk);
    check(q0 == 16'h0000, "reset value 0");
    check(q1 == 16'h03FE, "reset value 0x03FE");
    model = 0; rst = 0;
    for (int n = 0; n < 1000; n++) begin
      en = 1'($urandom); d = 16'($urandom);
      @(negedge clk);
      if (en) model = d;
      check(q0 == model, $sformatf("step %0d: q %h expected %h", n, q0, model));
      if (n > 0 || en) check(q1 == q0 || (!en && n == 0), "both instances load alike");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
