// tb_asip_data_mem: self-checking test of the data memory at its default
// depth of 67 words. Random writes and reads on the EX port are compared
// with a reference array, on both read ports; addresses beyond the depth
// read as zero and drop writes.
module tb_asip_data_mem;
  import asip_pkg::*;

  localparam int D = 67;
  logic clk = 1'b0, we;
  word_t addr, wdata, rdata, dbg_addr, dbg_rdata;
  word_t model [D];
  int checks = 0, failures = 0;

  asip_data_mem dut (.*);
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
    we = 1'b0; addr = '0; wdata = '0; dbg_addr = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1'b1; addr = word_t'(i); wdata = $urandom(); model[i] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom_range(1);
      addr = word_t'($urandom_range(D + 10));
      wdata = $urandom();
      dbg_addr = word_t'($urandom_range(D + 10));
      #1;
      chk(rdata, (addr < D) ? model[addr] : '0, "ex port");
      chk(dbg_rdata, (dbg_addr < D) ? model[dbg_addr] : '0, "dbg port");
      @(posedge clk);
      if (we && addr < D) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
