// tb_asip_top: end-to-end test of the FIR ASIP at its default parameters.
//
// Loads the FIR dot-product program through the program-load port, runs it
// and checks the running sums Y[i] in data memory, the final registers and
// the cycle at which the last result is stored (one instruction per cycle,
// two delay slots per taken jne). Runs: the two-tap case A = {4, 5},
// X = {6, 7}, which must give 59; a five-tap case with random values; and
// the five-tap case again with random stall cycles (en low), which must give
// the same results exactly the stalled number of cycles later. It counts how
// often each mechanism occurred (both bypass paths, taken and not-taken jne,
// stalls, every operation class) and fails any that never did.
module tb_asip_top;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n, en, pm_we;
  pc_t      pm_waddr;
  word_t    pm_wdata;
  reg_idx_t dbg_reg_idx;
  word_t    dbg_reg_data, dbg_dm_addr, dbg_dm_data;
  pc_t      pc;
  logic     stall, fwd_a, fwd_b, br_taken;
  ex_op_e   ex_op;

  asip_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fwd_a = 0, n_fwd_b = 0, n_taken = 0, n_not_taken = 0, n_stall = 0;
  int n_op [ex_op_e];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count mechanisms while the core runs
  always @(posedge clk) if (rst_n && en) begin
    if (!stall) begin
      if (fwd_a) n_fwd_a++;
      if (fwd_b) n_fwd_b++;
      if (ex_op == EX_JNE) begin
        if (br_taken) n_taken++; else n_not_taken++;
      end
      n_op[ex_op] = n_op.exists(ex_op) ? n_op[ex_op] + 1 : 1;
    end
  end
  always @(posedge clk) if (rst_n && !en && ex_op != EX_NOP) n_stall++;

  task automatic peek_dm(input int a, output word_t v);
    dbg_dm_addr = word_t'(a);
    #1;
    v = dbg_dm_data;
  endtask

  task automatic run_fir(input int n, input int a[], input int x[], input int stall_pct,
                         input string tag);
    prog_t prog;
    int    loop_pc, p_len, expect_cycle, cycle, mvm_seen, last_mvm_cycle, stalled;
    longint unsigned acc;
    word_t y [];
    word_t v;

    prog = fir_program(n, a, x, loop_pc);
    // load the program with the core held
    en = 1'b0; rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      pm_we = 1'b1; pm_waddr = pc_t'(i);
      pm_wdata = (i < prog.size()) ? prog[i] : i_nop();
      @(negedge clk);
    end
    pm_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // independent reference: running sums of A[i]*X[i], modulo 2^32
    y = new[n];
    acc = 0;
    for (int i = 0; i < n; i++) begin
      acc = acc + longint'(a[i]) * longint'(x[i]);
      y[i] = word_t'(acc);
    end

    p_len        = 1 + 2 * n + 8;
    expect_cycle = p_len + 11 * (n - 1) + 6;
    cycle = 0; mvm_seen = 0; last_mvm_cycle = -1; stalled = 0;
    en = 1'b1;
    while (cycle < expect_cycle + 40 + stalled) begin
      // at this point the pipeline shows the state before the next edge
      if (en && ex_op == EX_MVM) begin
        mvm_seen++;
        if (mvm_seen == n) last_mvm_cycle = cycle;
      end
      @(posedge clk);
      if (en) cycle++; else stalled++;
      @(negedge clk);
      en = ($urandom_range(99) >= 32'(stall_pct));
      if (cycle < 2) en = 1'b1;
    end
    en = 1'b1;
    @(negedge clk);

    check(last_mvm_cycle == expect_cycle,
          $sformatf("%s: last result stored in run cycle %0d, expected %0d",
                    tag, last_mvm_cycle, expect_cycle));
    check(mvm_seen == n, $sformatf("%s: %0d stores, expected %0d", tag, mvm_seen, n));
    for (int i = 0; i < n; i++) begin
      peek_dm(OUT_BASE + i, v);
      check(v == y[i], $sformatf("%s: Y[%0d] = %0d, expected %0d", tag, i, v, y[i]));
    end
    dbg_reg_idx = 5'd2; #1;
    check(dbg_reg_data == y[n-1], $sformatf("%s: r2 = %0d, expected %0d", tag, dbg_reg_data, y[n-1]));
    dbg_reg_idx = 5'd0; #1;
    check(dbg_reg_data == word_t'(n), $sformatf("%s: r0 = %0d", tag, dbg_reg_data));
    dbg_reg_idx = 5'd1; #1;
    check(dbg_reg_data == word_t'(n), $sformatf("%s: r1 = %0d", tag, dbg_reg_data));
    dbg_reg_idx = 5'd10; #1;
    check(dbg_reg_data == word_t'(n), $sformatf("%s: r10 = %0d", tag, dbg_reg_data));
    $display("%s: taps=%0d result=%0d, %0d run cycles, %0d stall cycles",
             tag, n, y[n-1], cycle, stalled);
  endtask

  initial begin
    int a5[], x5[];
    rst_n = 1'b0; en = 1'b0; pm_we = 1'b0; pm_waddr = '0; pm_wdata = '0;
    dbg_reg_idx = '0; dbg_dm_addr = '0;
    repeat (3) @(negedge clk);

    run_fir(2, '{4, 5}, '{6, 7}, 0, "fir2");
    begin
      word_t v;
      peek_dm(OUT_BASE + 1, v);
      check(v == 32'd59, "fir2: y = 59");
    end

    a5 = new[5]; x5 = new[5];
    foreach (a5[i]) begin a5[i] = $urandom_range(4095); x5[i] = $urandom_range(65535); end
    run_fir(5, a5, x5, 0, "fir5");
    run_fir(5, a5, x5, 30, "fir5_stall");

    check(n_fwd_a > 0, "bypass on operand a never used");
    check(n_fwd_b > 0, "bypass on operand b never used");
    check(n_taken > 0, "no taken jne");
    check(n_not_taken > 0, "no not-taken jne");
    check(n_stall > 0, "no stall cycle");
    foreach (n_op[k]) $display("  EX %s: %0d", k.name(), n_op[k]);
    $display("  bypass a %0d, bypass b %0d, jne taken %0d / not taken %0d, stalls %0d",
             n_fwd_a, n_fwd_b, n_taken, n_not_taken, n_stall);
    begin
      ex_op_e need [9] = '{EX_NOP, EX_ADD, EX_MUL, EX_INCR, EX_LDR, EX_LDM, EX_MVM,
                           EX_JNE, EX_MOVI};
      foreach (need[i]) check(n_op.exists(need[i]), $sformatf("%s never executed", need[i].name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
