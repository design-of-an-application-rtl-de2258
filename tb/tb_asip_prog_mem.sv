// tb_asip_prog_mem: self-checking test of the program memory.
// Loads every word through the load port, reads them back through the
// fetch port in random order, and checks that out-of-range addresses read
// as nop (zero) and ignore writes.
module tb_asip_prog_mem;
  import asip_pkg::*;

  localparam int D = 32;
  logic clk = 1'b0, we;
  pc_t rd_addr, wr_addr;
  word_t rd_data, wr_data;
  word_t model [D];
  int checks = 0, failures = 0;

  asip_prog_mem #(.DEPTH(D)) dut (.*);
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
    we = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = pc_t'(i); wr_data = $urandom(); model[i] = wr_data;
    end
    @(negedge clk);
    we = 1'b1; wr_addr = pc_t'(D + 3); wr_data = 32'hdead_beef;  // out of range
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 300; t++) begin
      rd_addr = pc_t'($urandom_range(D + 7));
      #1;
      chk(rd_data, (rd_addr < D) ? model[rd_addr] : '0, $sformatf("read %0d", rd_addr));
    end
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = pc_t'($urandom_range(D - 1)); wr_data = $urandom();
      model[wr_addr] = wr_data;
      @(negedge clk);
      we = 1'b0; rd_addr = wr_addr; #1;
      chk(rd_data, model[rd_addr], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
