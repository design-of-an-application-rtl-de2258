// tb_asip_fe_dc_reg: self-checking test of the FE/DC register: loads each
// cycle, holds while stalled, resets to the nop word.
module tb_asip_fe_dc_reg;
  import asip_pkg::*;

  logic clk = 1'b0, rst_n, stall;
  word_t instr_in, ir, model;
  int checks = 0, failures = 0;

  asip_fe_dc_reg dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; stall = 1'b0; instr_in = 32'hffff_ffff;
    @(negedge clk);
    checks++;
    if (ir !== '0) begin failures++; $display("FAIL reset value %h", ir); end
    rst_n = 1'b1; model = '0;
    for (int t = 0; t < 1000; t++) begin
      stall = ($urandom_range(3) == 0);
      instr_in = $urandom();
      rst_n = ($urandom_range(99) != 0);
      @(posedge clk);
      if (!rst_n) model = '0; else if (!stall) model = instr_in;
      @(negedge clk);
      checks++;
      if (ir !== model) begin failures++; $display("FAIL ir %h expected %h", ir, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
