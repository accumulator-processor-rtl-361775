// tb_ir_reg: checks the instruction register: reset to 0, capture of the
// memory data only when IRWrite is 1, and the opcode (IR[2:0]) and func3
// (IR[5:3]) fields.
module tb_ir_reg;
  logic clk = 0, rst, ir_write;
  logic [15:0] mem_data, ir;
  logic [2:0] opcode, func3;

  ir_reg dut (.*);
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
    rst = 1; ir_write = 1; mem_data = 16'hFFFF;
    @(negedge clk);
    check(ir == 16'h0, "reset to 0");
    model = 0; rst = 0;
    for (int n = 0; n < 1000; n++) begin
      ir_write = 1'($urandom); mem_data = 16'($urandom);
      @(negedge clk);
      if (ir_write) model = mem_data;
      check(ir == model, $sformatf("step %0d: ir %h expected %h", n, ir, model));
      check(opcode == model[2:0] && func3 == model[5:3], "opcode/func3 fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
