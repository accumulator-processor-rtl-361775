// tb_mem_wrapper: checks the MemIn address mux and the DataSRC write-data
// mux in front of the memory. PC, OUT and SP point at three different words
// holding known values; each MemIn setting must read its word, and writes
// with each DataSRC setting must store REG or OUT at the selected address.
module tb_mem_wrapper;
  import acc_pkg::*;
  logic clk = 0;
  memin_e mem_in; datasrc_e data_src;
  logic mem_write, ld_we;
  logic [15:0] pc_q, out_q, sp_q, reg_q, mem_data, ld_addr, ld_wdata, ld_rdata;

  mem_wrapper dut (.*);
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

  task automatic load(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); ld_addr = a; ld_wdata = d; ld_we = 1;
    @(negedge clk); ld_we = 0;
  endtask

  initial begin
    mem_write = 0; ld_we = 0; mem_in = MEMIN_PC; data_src = DS_REG;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] vp, vo, vs, rv;
      pc_q  = 16'(2 * $urandom_range(1, 170));
      out_q = 16'(2 * $urandom_range(171, 340));
      sp_q  = 16'(2 * $urandom_range(341, 511));
      reg_q = 16'($urandom);
      vp = 16'($urandom); vo = 16'($urandom); vs = 16'($urandom);
      load(pc_q, vp); load(out_q, vo); load(sp_q, vs);
      mem_in = MEMIN_PC;  #1; check(mem_data == vp, "MemIn 0 reads at PC");
      mem_in = MEMIN_OUT; #1; check(mem_data == vo, "MemIn 1 reads at OUT");
      mem_in = MEMIN_SP;  #1; check(mem_data == vs, "MemIn 2 reads at SP");
      // write REG at OUT (sw), then OUT at SP (push)
      @(negedge clk); mem_in = MEMIN_OUT; data_src = DS_REG; mem_write = 1;
      @(negedge clk); mem_in = MEMIN_SP;  data_src = DS_OUT; mem_write = 1;
      @(negedge clk); mem_write = 0;
      ld_addr = out_q; #1; check(ld_rdata == reg_q, "DataSRC 0 stores REG at OUT");
      ld_addr = sp_q;  #1; check(ld_rdata == out_q, "DataSRC 1 stores OUT at SP");
      ld_addr = pc_q;  #1; check(ld_rdata == vp, "word at PC untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
