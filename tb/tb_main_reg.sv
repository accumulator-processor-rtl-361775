// tb_main_reg: checks REG, the accumulator: it loads the input port while
// reset is high, takes the ALU result or the memory data according to
// RegSource when RegWrite is 1, and holds its value when RegWrite is 0.
module tb_main_reg;
  import acc_pkg::*;
  logic clk = 0, rst, reg_write;
  logic [15:0] io_in, alu_result, mem_data, q;
  regsrc_e reg_source;

  main_reg dut (.*);
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
    rst = 1; reg_write = 0; reg_source = RS_ALU; io_in = 16'd5040; alu_result = 0; mem_data = 0;
    @(negedge clk);
    check(q == 16'd5040, "reset loads the input port");
    model = q;
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      reg_write = 1'($urandom); reg_source = regsrc_e'($urandom_range(0, 1));
      alu_result = 16'($urandom); mem_data = 16'($urandom); io_in = 16'($urandom);
      @(negedge clk);
      if (reg_write) model = (reg_source == RS_MEM) ? mem_data : alu_result;
      check(q == model, $sformatf("step %0d: q %h expected %h", n, q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
