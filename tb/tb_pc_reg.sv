// tb_pc_reg: checks the program counter: reset to 0, the three PCSource
// inputs (OUT, ALU, memory), writing on PCWrite, writing on IsBranch only
// when Signage is 1, and holding otherwise.
module tb_pc_reg;
  import acc_pkg::*;
  logic clk = 0, rst, pc_write, is_branch, signage;
  logic [15:0] out_q, alu_result, mem_data, q;
  pcsrc_e pc_source;

  pc_reg dut (.*);
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

  int n_branch_taken = 0, n_branch_held = 0;

  initial begin
    logic [15:0] model, d;
    rst = 1; pc_write = 0; is_branch = 0; signage = 0; pc_source = PCS_ALU;
    out_q = 16'h1234; alu_result = 16'h5678; mem_data = 16'h9ABC;
    @(negedge clk);
    check(q == 16'h0, "reset to 0");
    model = 0; rst = 0;
    for (int n = 0; n < 2000; n++) begin
      pc_write = ($urandom_range(0, 3) == 0); is_branch = 1'($urandom); signage = 1'($urandom);
      pc_source = pcsrc_e'($urandom_range(0, 2));
      out_q = 16'($urandom); alu_result = 16'($urandom); mem_data = 16'($urandom);
      case (pc_source) PCS_OUT: d = out_q; PCS_ALU: d = alu_result; default: d = mem_data; endcase
      @(negedge clk);
      if (pc_write || (is_branch && signage)) model = d;
      if (!pc_write && is_branch) begin
        if (signage) n_branch_taken++; else n_branch_held++;
      end
      check(q == model, $sformatf("step %0d: q %h expected %h", n, q, model));
    end
    check(n_branch_taken > 0 && n_branch_held > 0, "both branch outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
