// tb_acc_memory: checks the processor memory against an array kept by the
// testbench. Random writes and reads through both ports, asynchronous read
// (data valid in the cycle the address is applied), aliasing of addresses
// above the 10-bit range, the hard-wired zero at address 0, and priority of
// the processor port, which blocks a load-port write in the same cycle.
module tb_acc_memory;
  logic clk = 0;
  logic [15:0] addr, wdata, rdata, ld_addr, ld_wdata, ld_rdata;
  logic we, ld_we;

  acc_memory dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [15:0] ref_mem [1024];

  initial begin
    we = 0; ld_we = 0; addr = 0; ld_addr = 0; wdata = 0; ld_wdata = 0;
    // fill every word through the load port
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      ld_addr = 16'(i); ld_wdata = 16'($urandom); ld_we = 1;
      ref_mem[i] = (i == 0) ? 16'h0 : ld_wdata;
    end
    @(negedge clk); ld_we = 0;
    // random mix
    for (int n = 0; n < 3000; n++) begin
      addr = 16'($urandom); ld_addr = 16'($urandom);
      we = ($urandom_range(0, 2) == 0); ld_we = ($urandom_range(0, 3) == 0);
      wdata = 16'($urandom); ld_wdata = 16'($urandom);
      if (n % 50 == 0) addr = 16'h0400;        // aliases word 0
      if (n % 70 == 0) ld_addr = addr;         // both ports on one word
      #1;
      check(rdata == ref_mem[addr[9:0]], $sformatf("read %h: %h expected %h", addr, rdata, ref_mem[addr[9:0]]));
      check(ld_rdata == ref_mem[ld_addr[9:0]], $sformatf("ld read %h", ld_addr));
      @(posedge clk);
      if (ld_we && ld_addr[9:0] != 0 && !we) ref_mem[ld_addr[9:0]] = ld_wdata;
      if (we && addr[9:0] != 0) ref_mem[addr[9:0]] = wdata;
      @(negedge clk);
    end
    we = 0; ld_we = 0; addr = 0; #1;
    check(rdata == 16'h0, "address 0 reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
