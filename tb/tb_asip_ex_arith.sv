// tb_asip_ex_arith: self-checking test of the EX arithmetic unit: results
// of every operation, register and memory write enables, store data, and
// jne taken / not taken, all suppressed while stalled.
module tb_asip_ex_arith;
  import asip_pkg::*;

  dc_ex_t   in;
  logic     stall, rf_we, dm_we, br_taken;
  reg_idx_t rf_idx;
  word_t    result, dm_addr, dm_wdata, dm_rdata;
  pc_t      br_target;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  asip_ex_arith dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      word_t er;
      logic ewe, edwe, ebr;
      word_t ewd;
      in = DC_EX_NOP;
      in.dec.op = ex_op_e'($urandom_range(11));
      in.dec.imm = $urandom();
      in.dec.rd = reg_idx_t'($urandom());
      in.dec.rd_we = $urandom_range(1);
      in.a = $urandom();
      in.b = ($urandom_range(3) == 0) ? in.a : $urandom();
      in.addr = $urandom();
      dm_rdata = $urandom();
      stall = ($urandom_range(4) == 0);
      #1;
      case (in.dec.op)
        EX_ADD:  er = in.a + in.b;
        EX_SUB:  er = in.a - in.b;
        EX_AND:  er = in.a & in.b;
        EX_OR:   er = in.a | in.b;
        EX_MUL:  er = word_t'(longint'(in.a) * longint'(in.b));
        EX_INCR: er = in.a + 1;
        EX_MOVI: er = in.dec.imm;
        EX_LDR:  er = dm_rdata;
        default: er = '0;
      endcase
      ewe  = in.dec.rd_we && !stall;
      edwe = (in.dec.op inside {EX_LDM, EX_MVM}) && !stall;
      ewd  = (in.dec.op == EX_LDM) ? {16'b0, in.dec.imm[15:0]} : in.a;
      ebr  = (in.dec.op == EX_JNE) && (in.a != in.b) && !stall;
      checks++;
      if (result !== er || rf_we !== ewe || rf_idx !== in.dec.rd || dm_we !== edwe ||
          dm_addr !== in.addr || (edwe && dm_wdata !== ewd) || br_taken !== ebr ||
          br_target !== in.dec.imm[15:0]) begin
        failures++;
        $display("FAIL op %s: result %h/%h rf_we %b/%b dm_we %b/%b br %b/%b", in.dec.op.name(),
                 result, er, rf_we, ewe, dm_we, edwe, br_taken, ebr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
