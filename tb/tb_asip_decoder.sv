// tb_asip_decoder: self-checking test of the instruction decoder.
// First the instruction words of the reference FIR listing (hex words as
// printed next to their disassembly), then random instructions of every
// class built with the encoders of asip_asm_pkg, each compared field by
// field with the expected decode.
module tb_asip_decoder;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  word_t ir;
  dec_t  dec;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  asip_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected decode; for fields an operation does not use, only the
  // used/we flags matter
  task automatic expect_dec(input word_t w, input ex_op_e op, input int ra, input bit ra_u,
                            input int rb, input bit rb_u, input int rd, input bit rd_w,
                            input word_t imm, input bit imm_chk);
    bit ok;
    ir = w; #1;
    ok = (dec.op == op) && (dec.ra_used == ra_u) && (dec.rb_used == rb_u) &&
         (dec.rd_we == rd_w);
    if (ra_u) ok &= (dec.ra == reg_idx_t'(ra));
    if (rb_u) ok &= (dec.rb == reg_idx_t'(rb));
    if (rd_w) ok &= (dec.rd == reg_idx_t'(rd));
    if (imm_chk) ok &= (dec.imm == imm);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %h: got op=%s ra=%0d/%0b rb=%0d/%0b rd=%0d/%0b imm=%h, expected %s",
               w, dec.op.name(), dec.ra, dec.ra_used, dec.rb, dec.rb_used, dec.rd,
               dec.rd_we, dec.imm, op.name());
    end
  endtask

  initial begin
    // words of the FIR listing
    expect_dec(32'hd00a0002, EX_LDM, 0, 0, 0, 0, 0, 0, 32'h000a_0002, 1);
    expect_dec(32'hd01b0007, EX_LDM, 0, 0, 0, 0, 0, 0, 32'h001b_0007, 1);
    expect_dec(32'h840a0000, EX_MOVI, 0, 0, 0, 0, 10, 1, 32'h0, 1);
    expect_dec(32'h8402000a, EX_MOVI, 0, 0, 0, 0, 2, 1, 32'ha, 1);
    expect_dec(32'h84030010, EX_MOVI, 0, 0, 0, 0, 3, 1, 32'h10, 1);
    expect_dec(32'h90410000, EX_LDR, 2, 1, 1, 1, 0, 1, 0, 0);
    expect_dec(32'h90682000, EX_LDR, 3, 1, 8, 1, 4, 1, 0, 0);
    expect_dec(32'h90a83000, EX_LDR, 5, 1, 8, 1, 6, 1, 0, 0);
    expect_dec(32'h00862006, EX_MUL, 4, 1, 6, 1, 4, 1, 0, 0);
    expect_dec(32'h00441001, EX_ADD, 2, 1, 4, 1, 2, 1, 0, 0);
    expect_dec(32'h8c4a002a, EX_MVM, 2, 1, 10, 1, 0, 0, 32'h2a, 1);
    expect_dec(32'h01400006, EX_INCR, 10, 1, 0, 0, 10, 1, 0, 0);
    expect_dec(32'h01000006, EX_INCR, 8, 1, 0, 0, 8, 1, 0, 0);
    expect_dec(32'h00000006, EX_INCR, 0, 1, 0, 0, 0, 1, 0, 0);
    expect_dec(32'he020000d, EX_JNE, 1, 1, 0, 1, 0, 0, 32'hd, 1);
    expect_dec(32'h00000000, EX_NOP, 0, 0, 0, 0, 0, 0, 0, 0);
    // random instructions of every class
    for (int t = 0; t < 2000; t++) begin
      int d, s1, s2, v, k;
      d = $urandom_range(31); s1 = $urandom_range(31); s2 = $urandom_range(31);
      v = $urandom();
      k = $urandom_range(10);
      case (k)
        0: expect_dec(i_add(d, s1, s2), EX_ADD, s1, 1, s2, 1, d, 1, 0, 0);
        1: expect_dec(i_alu(2, d, s1, s2), EX_SUB, s1, 1, s2, 1, d, 1, 0, 0);
        2: expect_dec(i_alu(3, d, s1, s2), EX_AND, s1, 1, s2, 1, d, 1, 0, 0);
        3: expect_dec(i_alu(4, d, s1, s2), EX_OR, s1, 1, s2, 1, d, 1, 0, 0);
        4: if (s2 != 0 || d != 0) expect_dec(i_mul(d, s1, s2), EX_MUL, s1, 1, s2, 1, d, 1, 0, 0);
           else expect_dec(i_mul(d, s1, s2), EX_INCR, s1, 1, 0, 0, s1, 1, 0, 0);
        5: expect_dec(i_incr(s1), EX_INCR, s1, 1, 0, 0, s1, 1, 0, 0);
        6: expect_dec(i_ldr(d, s1, s2), EX_LDR, s1, 1, s2, 1, d, 1, 0, 0);
        7: expect_dec(i_ldm(v & 'hfff, (v >> 12) & 'hffff), EX_LDM, 0, 0, 0, 0, 0, 0,
                      {4'b0, 12'(v), 16'(v >> 12)}, 1);
        8: expect_dec(i_mvm(d, v & 'hfff, s1), EX_MVM, s1, 1, d, 1, 0, 0, word_t'(v & 'hfff), 1);
        9: expect_dec(i_jne(d, s1, v & 'hffff), EX_JNE, s1, 1, d, 1, 0, 0, word_t'(v & 'hffff), 1);
        default: expect_dec(i_movi(d, v & 'hfff), EX_MOVI, 0, 0, 0, 0, d, 1, word_t'(v & 'hfff), 1);
      endcase
    end
    // unused ALU function codes and major opcodes decode as nop
    expect_dec(i_alu(5, 3, 4, 5), EX_NOP, 0, 0, 0, 0, 0, 0, 0, 0);
    expect_dec(i_alu(63, 3, 4, 5), EX_NOP, 0, 0, 0, 0, 0, 0, 0, 0);
    expect_dec(32'h4000_1234, EX_NOP, 0, 0, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
