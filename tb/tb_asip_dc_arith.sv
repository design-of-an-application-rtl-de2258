// tb_asip_dc_arith: self-checking test of the DC arithmetic unit: operand
// selection between register file and bypass, and the data address for
// ldr (a + b), mvm (b + imm) and ldm (imm[31:16]).
module tb_asip_dc_arith;
  import asip_pkg::*;

  dec_t   dec;
  word_t  rf_a, rf_b, ex_result;
  logic   fwd_a, fwd_b;
  dc_ex_t out;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  asip_dc_arith dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      word_t ea, eb, eaddr;
      dec = DEC_NOP;
      dec.op = ex_op_e'($urandom_range(11));
      dec.imm = $urandom();
      rf_a = $urandom(); rf_b = $urandom(); ex_result = $urandom();
      fwd_a = $urandom_range(1); fwd_b = $urandom_range(1);
      #1;
      ea = fwd_a ? ex_result : rf_a;
      eb = fwd_b ? ex_result : rf_b;
      case (dec.op)
        EX_LDR:  eaddr = ea + eb;
        EX_MVM:  eaddr = eb + dec.imm;
        EX_LDM:  eaddr = {16'b0, dec.imm[31:16]};
        default: eaddr = '0;
      endcase
      checks++;
      if (out.a !== ea || out.b !== eb || out.addr !== eaddr || out.dec !== dec) begin
        failures++;
        $display("FAIL op %s: a %h/%h b %h/%h addr %h/%h", dec.op.name(), out.a, ea,
                 out.b, eb, out.addr, eaddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
