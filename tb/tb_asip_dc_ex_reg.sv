// tb_asip_dc_ex_reg: self-checking test of the DC/EX register: loads each
// cycle, holds while stalled, resets to a nop.
module tb_asip_dc_ex_reg;
  import asip_pkg::*;

  logic clk = 1'b0, rst_n, stall;
  dc_ex_t d, q, model;
  int checks = 0, failures = 0;

  asip_dc_ex_reg dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; stall = 1'b0; d = '1;
    @(negedge clk);
    checks++;
    if (q !== DC_EX_NOP) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1; model = DC_EX_NOP;
    for (int t = 0; t < 1000; t++) begin
      stall = ($urandom_range(3) == 0);
      rst_n = ($urandom_range(99) != 0);
      d.a = $urandom(); d.b = $urandom(); d.addr = $urandom();
      d.dec.imm = $urandom(); d.dec.rd = reg_idx_t'($urandom());
      d.dec.op = ex_op_e'($urandom_range(11)); d.dec.rd_we = $urandom_range(1);
      @(posedge clk);
      if (!rst_n) model = DC_EX_NOP; else if (!stall) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL q differs at %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
