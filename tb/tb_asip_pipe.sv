// tb_asip_pipe: self-checking test of the three-stage pipeline against an
// instruction-set reference model.
//
// Program memory, register file and data memory are plain arrays in the
// testbench. Each round generates a random program over all operations (with
// forward jne branches and their two delay slots, and many back-to-back
// register dependencies so that both bypass paths are used), runs it on the
// pipeline with random stall cycles and compares every register and every
// data word with a sequential model. The model counts the instructions E the
// program executes; the pipeline must have completed them all after exactly
// E + 2 un-stalled cycles (one instruction per cycle after a two-cycle fill),
// which the last instruction of each program, a marker movi, makes visible.
module tb_asip_pipe;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  logic clk = 1'b0, rst_n, en;
  pc_t pm_addr, pc;
  word_t pm_rdata, rf_a, rf_b, rf_wdata, dm_addr, dm_wdata, dm_rdata;
  reg_idx_t rf_ra, rf_rb, rf_widx;
  logic rf_we, dm_we, stall, fwd_a, fwd_b, br_taken;
  ex_op_e ex_op;

  asip_pipe dut (.*);
  always #5 clk = ~clk;

  // testbench-side resources
  word_t pm [int];
  word_t rf [32];
  word_t dm [word_t];
  assign pm_rdata = pm.exists(int'(pm_addr)) ? pm[int'(pm_addr)] : '0;
  assign rf_a     = rf[rf_ra];
  assign rf_b     = rf[rf_rb];
  assign dm_rdata = dm.exists(dm_addr) ? dm[dm_addr] : '0;
  always @(posedge clk) begin
    if (rf_we) rf[rf_widx] <= rf_wdata;
    if (dm_we) dm[dm_addr] = dm_wdata;  // the same instruction never reads it
  end

  int checks = 0, failures = 0;
  int n_fwd_a = 0, n_fwd_b = 0, n_taken = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (!stall && fwd_a) n_fwd_a++;
    if (!stall && fwd_b) n_fwd_b++;
    if (br_taken) n_taken++;
    if (stall) n_stall++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // sequential reference model with two branch delay slots
  task automatic iss(input word_t prog [$], output word_t mrf [32], output word_t mdm [word_t],
                     output int executed);
    int p = 0, pending = -1, countdown = 0;
    foreach (mrf[i]) mrf[i] = '0;
    mdm.delete();
    executed = 0;
    while (p < prog.size() && executed < 10000) begin
      word_t w = prog[p];
      logic [4:0] s1 = w[25:21], s2 = w[20:16], d = w[15:11];
      int nextp = p + 1;
      executed++;
      if (w[31:28] == 4'b1101) mdm[word_t'(w[27:16])] = word_t'(w[15:0]);
      else case (w[31:26])
        6'b000000: case (w[5:0])
          6'd1: mrf[d] = mrf[s1] + mrf[s2];
          6'd2: mrf[d] = mrf[s1] - mrf[s2];
          6'd3: mrf[d] = mrf[s1] & mrf[s2];
          6'd4: mrf[d] = mrf[s1] | mrf[s2];
          6'd6: if (s2 == 0 && d == 0) mrf[s1] = mrf[s1] + 1;
                else mrf[d] = mrf[s1] * mrf[s2];
          default: ;
        endcase
        6'b100100: begin
          word_t a = mrf[s1] + mrf[s2];
          mrf[d] = mdm.exists(a) ? mdm[a] : '0;
        end
        6'b100011: mdm[mrf[s2] + word_t'(w[11:0])] = mrf[s1];
        6'b111000: if (mrf[s1] != mrf[s2]) begin pending = int'(w[15:0]); countdown = 3; end
        6'b100001: mrf[s2] = word_t'(w[11:0]);
        default: ;
      endcase
      if (countdown > 0) begin
        countdown--;
        if (countdown == 0) nextp = pending;
      end
      p = nextp;
    end
  endtask

  function automatic int rreg();
    return $urandom_range(7);
  endfunction

  task automatic one_round(input int round, input int stall_pct);
    word_t prog [$];
    word_t mrf [32];
    word_t mdm [word_t];
    int len, executed, cycles, last_jne;
    len = $urandom_range(20, 60);
    last_jne = -10;
    // initialise r0..r7 with small values so loads hit a small window
    for (int r = 0; r < 8; r++) prog.push_back(i_movi(r, $urandom_range(15)));
    for (int i = 0; i < 16; i++) prog.push_back(i_ldm(i, $urandom()));
    while (prog.size() < len + 24) begin
      int k = $urandom_range(12);
      int pos = prog.size();
      case (k)
        0: prog.push_back(i_add(rreg(), rreg(), rreg()));
        1: prog.push_back(i_alu(2, rreg(), rreg(), rreg()));
        2: prog.push_back(i_alu(3, rreg(), rreg(), rreg()));
        3: prog.push_back(i_alu(4, rreg(), rreg(), rreg()));
        4: prog.push_back(i_mul(1 + $urandom_range(6), rreg(), 1 + $urandom_range(6)));
        5: prog.push_back(i_incr(rreg()));
        6: prog.push_back(i_movi(rreg(), $urandom_range(4095)));
        7: begin  // load from the small window: movi base, then ldr
             int b = rreg();
             prog.push_back(i_movi(b, $urandom_range(15)));
             prog.push_back(i_ldr(rreg(), b, b == 0 ? 1 : 0));
           end
        8: prog.push_back(i_mvm(rreg(), $urandom_range(31), rreg()));
        9: prog.push_back(i_ldm($urandom_range(31), $urandom_range(65535)));
        10: prog.push_back(i_nop());
        default: if (pos - last_jne >= 3) begin
             // forward branch beyond its own delay slots
             prog.push_back(i_jne(rreg(), rreg(), pos + 3 + $urandom_range(4)));
             last_jne = pos;
           end
      endcase
    end
    // the marker write is outside any delay slot
    prog.push_back(i_nop()); prog.push_back(i_nop()); prog.push_back(i_nop());
    prog.push_back(i_movi(7, 'h5a5));

    iss(prog, mrf, mdm, executed);

    en = 1'b0; rst_n = 1'b0;
    pm.delete();
    foreach (prog[i]) pm[i] = prog[i];
    foreach (rf[i]) rf[i] = '0;
    dm.delete();
    @(negedge clk);
    rst_n = 1'b1;
    cycles = 0;
    while (cycles < executed + 2) begin
      en = (cycles < 1) || ($urandom_range(99) >= 32'(stall_pct));
      @(posedge clk);
      if (en) cycles++;
      @(negedge clk);
    end
    en = 1'b0;
    #1;
    for (int r = 0; r < 32; r++)
      chk(rf[r] == mrf[r], $sformatf("round %0d: r%0d = %h, model %h", round, r, rf[r], mrf[r]));
    foreach (mdm[a])
      chk(dm.exists(a) && dm[a] == mdm[a], $sformatf("round %0d: DM[%0h] differs", round, a));
    chk(dm.size() == mdm.size(), $sformatf("round %0d: %0d words written, model %0d", round,
                                           dm.size(), mdm.size()));
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(negedge clk);
    for (int round = 0; round < 60; round++) one_round(round, (round % 3) * 20);
    chk(n_fwd_a > 0, "bypass a never used");
    chk(n_fwd_b > 0, "bypass b never used");
    chk(n_taken > 0, "no taken branch");
    chk(n_stall > 0, "no stall");
    $display("bypass a %0d, bypass b %0d, taken %0d, stall cycles %0d", n_fwd_a, n_fwd_b,
             n_taken, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
