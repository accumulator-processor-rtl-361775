// tb_acc_cpu: end-to-end test of the accumulator processor at its default
// parameters.
//
// The testbench holds its own instruction-level model of the processor (a
// plain interpreter of the 13 instructions written from the instruction
// table, not from the RTL). Each time the control unit enters Fetch, the
// previous instruction has finished: the testbench then compares the
// processor's PC and REG with the model, checks that the instruction took
// the number of clocks its state path needs (3 to 6), and steps the model.
// At the end it compares every memory word with the model's.
//
// Programs (assembled by the encoding functions below):
//   1. a directed program that executes every instruction, takes and skips
//      each of the four branch kinds, nests two push/jal/pop calls and
//      tries to overwrite the hard-wired zero at address 0;
//   2. three short sequences: a word copy, a store-and-compare whose bne
//      skips one instruction, and a jal loop that counts up;
//   3. relPrime(n): the smallest m >= 2 with gcd(n, m) = 1, gcd by repeated
//      subtraction in a called procedure, for every n from 3 to 64 and for
//      210, 720, 2310, 2520 and 5040.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_acc_cpu;
  import acc_pkg::*;

  localparam int DEPTH = 1024;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] io_in, io_out, ld_addr, ld_wdata, ld_rdata, pc;
  logic ld_we;
  state_e state;

  acc_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200_000_000;   // 20 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- instruction encoders ----------------
  function automatic logic [15:0] r_(input logic [2:0] f, input int a);
    return {a[9:0], f, 3'b000};
  endfunction
  function automatic logic [15:0] c_(input logic [2:0] f, input int off);
    return {2'b10, off[7:0], f, 3'b001};   // compare field written as 2
  endfunction
  function automatic logic [15:0] i_(input logic [2:0] f, input int imm);
    return {imm[9:0], f, 3'b010};
  endfunction
  function automatic logic [15:0] jal_(input int a);
    return {a[9:0], 3'b000, 3'b011};
  endfunction
  localparam logic [15:0] PUSH = 16'h0004, POP = 16'h000C;

  function automatic logic [15:0] add_(input int a);  return r_(3'd0, a); endfunction
  function automatic logic [15:0] sub_(input int a);  return r_(3'd1, a); endfunction
  function automatic logic [15:0] lw_(input int a);   return r_(3'd2, a); endfunction
  function automatic logic [15:0] sw_(input int a);   return r_(3'd3, a); endfunction
  function automatic logic [15:0] beq_(input int o);  return c_(3'd0, o); endfunction
  function automatic logic [15:0] bne_(input int o);  return c_(3'd1, o); endfunction
  function automatic logic [15:0] blt_(input int o);  return c_(3'd2, o); endfunction
  function automatic logic [15:0] bge_(input int o);  return c_(3'd3, o); endfunction
  function automatic logic [15:0] addi_(input int i); return i_(3'd0, i); endfunction
  function automatic logic [15:0] subi_(input int i); return i_(3'd1, i); endfunction

  // ---------------- program image and model ----------------
  logic [15:0] img [DEPTH];   // program image, loaded into the processor
  logic [15:0] mm  [DEPTH];   // model memory
  logic [15:0] m_pc, m_reg, m_sp;

  // mechanism counters
  int n_add, n_sub, n_lw, n_sw, n_addi, n_subi, n_jal, n_push, n_pop;
  int n_taken[4], n_not[4];   // beq, bne, blt, bge
  int n_zero_write, n_nested, depth, max_depth;

  function automatic logic [15:0] mrd(input logic [15:0] a);
    return (a[9:0] == 0) ? 16'h0 : mm[a[9:0]];
  endfunction
  function automatic void mwr(input logic [15:0] a, input logic [15:0] d);
    if (a[9:0] != 0) mm[a[9:0]] = d;
    else n_zero_write++;
  endfunction

  // Executes one instruction in the model; returns its clock count.
  function automatic int model_step();
    logic [15:0] ins, op, a10, off;
    logic [2:0]  f;
    bit          cond;
    ins = mrd(m_pc);
    f   = ins[5:3];
    a10 = {6'd0, ins[15:6]};
    off = {8'd0, ins[13:6]};
    m_pc = m_pc + 16'd2;
    case (ins[2:0])
      3'b000: case (f)
        3'd0: begin m_reg = m_reg + mrd(a10); n_add++; return 4; end
        3'd1: begin m_reg = m_reg - mrd(a10); n_sub++; return 4; end
        3'd2: begin m_reg = mrd(a10); n_lw++; return 3; end
        3'd3: begin mwr(a10, m_reg); n_sw++; return 3; end
        default: return 2;
      endcase
      3'b001: begin
        if (f > 3) return 2;
        case (f)
          3'd0: cond = (m_reg == mrd(16'd2));
          3'd1: cond = (m_reg != mrd(16'd2));
          3'd2: cond = ($signed(m_reg) <  $signed(mrd(16'd2)));
          default: cond = ($signed(m_reg) >= $signed(mrd(16'd2)));
        endcase
        if (cond) begin m_pc = m_pc + off; n_taken[f[1:0]]++; end
        else n_not[f[1:0]]++;
        return 6;
      end
      3'b010: case (f)
        3'd0: begin m_reg = m_reg + a10; n_addi++; return 3; end
        3'd1: begin m_reg = m_reg - a10; n_subi++; return 3; end
        default: return 2;
      endcase
      3'b011: if (f == 0) begin m_pc = a10; n_jal++; return 3; end else return 2;
      3'b100: case (f)
        3'd0: begin
          mwr(m_sp, m_pc + 16'd2); m_sp = m_sp - 16'd2; n_push++;
          depth++; if (depth > 1) n_nested++; if (depth > max_depth) max_depth = depth;
          return 5;
        end
        3'd1: begin m_sp = m_sp + 16'd2; m_pc = mrd(m_sp); n_pop++; depth--; return 4; end
        default: return 2;
      endcase
      default: return 2;
    endcase
  endfunction

  // ---------------- run one program ----------------
  int instr_count;
  longint run_cycles;
  logic [15:0] end_reg;   // REG when the run stopped

  task automatic run(input logic [15:0] arg, input int max_instr, input bit must_halt = 1'b1);
    int expect_cyc, cyc, i;
    logic [15:0] ins;
    bit halted;
    // reset and load (memory is written word by word through the load port)
    rst = 1'b1; io_in = arg; ld_we = 1'b0; ld_addr = '0; ld_wdata = '0;
    @(negedge clk);
    for (i = 0; i < DEPTH; i++) begin
      ld_addr = 16'(i); ld_wdata = img[i]; ld_we = 1'b1;
      @(negedge clk);
    end
    ld_we = 1'b0;
    for (i = 0; i < DEPTH; i++) mm[i] = img[i];
    m_pc = 16'h0000; m_reg = arg; m_sp = 16'h03FE; depth = 0;
    @(negedge clk);
    rst = 1'b0;
    instr_count = 0; run_cycles = 0; halted = 0;
    // wait for the first Fetch
    cyc = 0;
    while (state != S_FETCH) begin @(negedge clk); cyc++; end
    expect_cyc = 0;
    while (!halted && instr_count < max_instr) begin
      // state == S_FETCH here: the previous instruction is complete
      check(pc == m_pc, $sformatf("pc %h, model %h", pc, m_pc));
      check(io_out == m_reg, $sformatf("REG %h, model %h at pc %h", io_out, m_reg, m_pc));
      ins = mrd(m_pc);
      halted = (ins == jal_(int'(m_pc)));
      expect_cyc = model_step();
      instr_count++;
      cyc = 0;
      do begin @(negedge clk); cyc++; run_cycles++; end
      while (state != S_FETCH && cyc < 20);
      check(cyc == expect_cyc, $sformatf("instr %h took %0d clocks, expected %0d", ins, cyc, expect_cyc));
    end
    end_reg = io_out;
    if (must_halt) check(halted, "program did not reach its final self-jump");
    // memory against the model
    for (i = 0; i < DEPTH; i++) begin
      ld_addr = 16'(i);
      #1;
      check(ld_rdata == ((i == 0) ? 16'h0 : mm[i]), $sformatf("mem[%h] %h, model %h", i, ld_rdata, mm[i]));
    end
  endtask

  function automatic int gcd_ref(input int a, input int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction
  function automatic int relprime_ref(input int n);
    int m = 2;
    while (gcd_ref(n, m) != 1) m++;
    return m;
  endfunction

  // ---------------- programs ----------------
  task automatic put(input int a, input logic [15:0] w); img[a] = w; endtask

  task automatic build_directed();
    foreach (img[k]) img[k] = 16'h0;
    put('h40, sw_(4));      put('h42, addi_(10));  put('h44, subi_(3));
    put('h46, sw_(6));      put('h48, add_(4));    put('h4A, sub_(6));
    put('h4C, sw_(2));      put('h4E, beq_(2));    put('h50, addi_(100));
    put('h52, bne_(2));     put('h54, addi_(1));   put('h56, blt_(2));
    put('h58, bge_(2));     put('h5A, addi_(200)); put('h5C, subi_(2));
    put('h5E, blt_(2));     put('h60, addi_(300)); put('h62, bne_(2));
    put('h64, addi_(400));  put('h66, beq_(2));    put('h68, bge_(2));
    put('h6A, sw_(8));      put('h6C, PUSH);       put('h6E, jal_('h80));
    put('h70, sw_(12));     put('h72, sw_(0));     put('h74, lw_(0));
    put('h76, add_(12));    put('h78, jal_('h78));
    put('h80, addi_(7));    put('h82, PUSH);       put('h84, jal_('h90));
    put('h86, POP);
    put('h90, subi_(1));    put('h92, POP);
  endtask

  // Three short sequences: copy a word (lw 8 / sw 10), store and compare
  // with a taken bne that skips one instruction, and count up by 1 in a
  // jal loop (stopped by the instruction limit).
  task automatic build_examples();
    foreach (img[k]) img[k] = 16'h0;
    img[8] = 16'h1234;
    put('h40, lw_(8));   put('h42, sw_(10));  put('h44, lw_(0));
    put('h46, addi_(2)); put('h48, sw_(2));   put('h4A, add_(2));
    put('h4C, bne_(2));  put('h4E, subi_(1)); put('h50, sub_(2));
    put('h52, sw_(12));  put('h54, lw_(0));
    put('h56, addi_(1)); put('h58, jal_('h56));
  endtask

  // relPrime: n arrives in REG. Data: 4 n, 6 m, 8 a, 10 b, 12 gcd result.
  localparam int LOOP = 'h48, DONE = 'h68, HALT = 'h6A, GCD = 'h6C, WHILE = 'h78,
                 AGTB = 'h8E, RETA = 'h96;
  task automatic build_relprime();
    foreach (img[k]) img[k] = 16'h0;
    put('h40, sw_(4));  put('h42, lw_(0));  put('h44, addi_(2)); put('h46, sw_(6));
    // LOOP
    put('h48, lw_(4));  put('h4A, sw_(8));  put('h4C, lw_(6));   put('h4E, sw_(10));
    put('h50, PUSH);    put('h52, jal_(GCD));
    put('h54, sw_(12)); put('h56, lw_(0));  put('h58, addi_(1)); put('h5A, sw_(2));
    put('h5C, lw_(12)); put('h5E, beq_(DONE - 'h60));
    put('h60, lw_(6));  put('h62, addi_(1)); put('h64, sw_(6));  put('h66, jal_(LOOP));
    put(DONE, lw_(6));  put(HALT, jal_(HALT));
    // GCD(a = mem[8], b = mem[10]) -> REG
    put('h6C, lw_(0));  put('h6E, sw_(2));  put('h70, lw_(8));   put('h72, bne_(WHILE - 'h74));
    put('h74, lw_(10)); put('h76, POP);
    put('h78, lw_(0));  put('h7A, sw_(2));  put('h7C, lw_(10));  put('h7E, beq_(RETA - 'h80));
    put('h80, lw_(8));  put('h82, sw_(2));  put('h84, lw_(10));  put('h86, blt_(AGTB - 'h88));
    put('h88, sub_(8)); put('h8A, sw_(10)); put('h8C, jal_(WHILE));
    put(AGTB, lw_(8));  put('h90, sub_(10)); put('h92, sw_(8));  put('h94, jal_(WHILE));
    put(RETA, lw_(8));  put('h98, POP);
  endtask

  // every n from 3 to 64, then larger highly composite values up to 5040
  int args[$];

  initial begin
    io_in = '0; ld_we = 1'b0; ld_addr = '0; ld_wdata = '0;
    n_add = 0; n_sub = 0; n_lw = 0; n_sw = 0; n_addi = 0; n_subi = 0; n_jal = 0;
    n_push = 0; n_pop = 0; n_zero_write = 0; n_nested = 0; max_depth = 0;
    foreach (n_taken[k]) begin n_taken[k] = 0; n_not[k] = 0; end
    repeat (3) @(negedge clk);

    build_directed();
    run(16'd5, 1000);
    check(io_out == 16'd10, $sformatf("directed program result %0d, expected 10", io_out));
    $display("directed program: %0d instructions, %0d clocks", instr_count, run_cycles);

    build_examples();
    // 32 no-ops below 0x0040, 10 instructions (one is skipped), 20 turns of the loop
    run(16'd0, 32 + 10 + 40, 1'b0);
    check(end_reg == 16'd20, $sformatf("counting loop reached %0d, expected 20", end_reg));
    ld_addr = 16'd10; #1; check(ld_rdata == 16'h1234, "lw 8 / sw 10 copied the word");
    ld_addr = 16'd12; #1; check(ld_rdata == 16'd2, "bne skipped subi: 2 + 2 - 2 = 2");

    build_relprime();
    for (int n = 3; n <= 64; n++) args.push_back(n);
    args.push_back(210); args.push_back(720); args.push_back(2310); args.push_back(2520);
    args.push_back(5040);
    foreach (args[k]) begin
      run(16'(args[k]), 2_000_000);
      check(io_out == 16'(relprime_ref(args[k])),
            $sformatf("relPrime(%0d) = %0d, expected %0d", args[k], io_out, relprime_ref(args[k])));
      if (args[k] > 64 || args[k] % 10 == 0)
        $display("relPrime(%0d) = %0d: %0d instructions, %0d clocks, CPI %0.2f",
                 args[k], io_out, instr_count, run_cycles, real'(run_cycles) / instr_count);
    end

    $display("mechanisms: add %0d sub %0d lw %0d sw %0d addi %0d subi %0d jal %0d push %0d pop %0d",
             n_add, n_sub, n_lw, n_sw, n_addi, n_subi, n_jal, n_push, n_pop);
    $display("  beq taken/not %0d/%0d bne %0d/%0d blt %0d/%0d bge %0d/%0d zero-write %0d nested-push %0d",
             n_taken[0], n_not[0], n_taken[1], n_not[1], n_taken[2], n_not[2], n_taken[3], n_not[3],
             n_zero_write, n_nested);
    check(n_add > 0 && n_sub > 0 && n_lw > 0 && n_sw > 0, "an R-type instruction never ran");
    check(n_addi > 0 && n_subi > 0 && n_jal > 0, "an I/J-type instruction never ran");
    check(n_push > 0 && n_pop > 0 && n_nested > 0, "push/pop or a nested call never ran");
    foreach (n_taken[k]) check(n_taken[k] > 0 && n_not[k] > 0, $sformatf("branch kind %0d not both taken and skipped", k));
    check(n_zero_write > 0, "no write to the hard-wired zero word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
