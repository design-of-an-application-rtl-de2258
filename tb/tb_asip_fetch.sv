// tb_asip_fetch: self-checking test of the FE stage. Compares the PC with a
// reference over random stall and branch inputs: +1 per cycle, the target on
// a taken branch, hold on stall, 0 after reset.
module tb_asip_fetch;
  import asip_pkg::*;

  logic clk = 1'b0, rst_n, stall, br_taken;
  pc_t br_target, pc, pm_addr, model;
  int checks = 0, failures = 0;

  asip_fetch dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; stall = 1'b0; br_taken = 1'b0; br_target = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1; model = '0;
    for (int t = 0; t < 1000; t++) begin
      checks++;
      if (pc !== model || pm_addr !== model) begin
        failures++; $display("FAIL cycle %0d: pc %h expected %h", t, pc, model);
      end
      stall = ($urandom_range(9) == 0);
      br_taken = ($urandom_range(7) == 0);
      br_target = pc_t'($urandom());
      rst_n = ($urandom_range(199) != 0);
      @(posedge clk);
      if (!rst_n) model = '0;
      else if (stall) model = model;
      else if (br_taken) model = br_target;
      else model = model + 1'b1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
