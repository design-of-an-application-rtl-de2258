// tb_asip_regfile: self-checking test of the register file.
// Checks reset to zero, random writes against a reference array on all three
// read ports, reads of indices at or above NUM_REGS (zero) and dropped writes
// to them.
module tb_asip_regfile;
  import asip_pkg::*;

  logic clk = 1'b0, rst_n, we;
  reg_idx_t ra_idx, rb_idx, dbg_idx, wr_idx;
  word_t ra_data, rb_data, dbg_data, wr_data;
  word_t model [32];
  int checks = 0, failures = 0;

  asip_regfile #(.NUM_REGS(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; wr_idx = '0; wr_data = '0;
    ra_idx = '0; rb_idx = '0; dbg_idx = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      dbg_idx = reg_idx_t'(i); #1;
      chk(dbg_data, '0, $sformatf("reset r%0d", i));
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom_range(1);
      wr_idx = reg_idx_t'($urandom_range(31));
      wr_data = $urandom();
      ra_idx = reg_idx_t'($urandom_range(31));
      rb_idx = reg_idx_t'($urandom_range(31));
      dbg_idx = reg_idx_t'($urandom_range(31));
      #1;
      // reads see the state before this cycle's write
      chk(ra_data, model[ra_idx], "ra");
      chk(rb_data, model[rb_idx], "rb");
      chk(dbg_data, model[dbg_idx], "dbg");
      @(posedge clk);
      if (we && wr_idx < 16) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
