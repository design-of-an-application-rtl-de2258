// tb_asip_pipe_ctrl: self-checking test of the pipeline controller: stall
// follows the enable, and each bypass select is raised exactly when the DC
// operand is used and names the register EX is writing.
module tb_asip_pipe_ctrl;
  import asip_pkg::*;

  logic en, dc_ra_used, dc_rb_used, ex_rd_we, stall, fwd_a, fwd_b;
  reg_idx_t dc_ra, dc_rb, ex_rd;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  asip_pipe_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits = 0;
    for (int t = 0; t < 5000; t++) begin
      bit ea, eb;
      en = $urandom_range(1);
      dc_ra = reg_idx_t'($urandom_range(3)); dc_rb = reg_idx_t'($urandom_range(3));
      ex_rd = reg_idx_t'($urandom_range(3));
      dc_ra_used = $urandom_range(1); dc_rb_used = $urandom_range(1);
      ex_rd_we = $urandom_range(1);
      #1;
      ea = dc_ra_used && ex_rd_we && (dc_ra == ex_rd);
      eb = dc_rb_used && ex_rd_we && (dc_rb == ex_rd);
      if (ea) hits++;
      checks++;
      if (stall !== !en || fwd_a !== ea || fwd_b !== eb) begin
        failures++;
        $display("FAIL en=%b ra=%0d/%b rb=%0d/%b rd=%0d/%b: stall=%b fwd=%b%b",
                 en, dc_ra, dc_ra_used, dc_rb, dc_rb_used, ex_rd, ex_rd_we, stall, fwd_a, fwd_b);
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no bypass case generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
