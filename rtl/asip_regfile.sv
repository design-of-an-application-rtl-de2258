// asip_regfile: general-purpose register file (GPR) of the FIR ASIP.
//
// NUM_REGS registers of 32 bits. Two combinational read ports serve the DC
// stage, a third one lets a host or testbench inspect the registers, and one
// write port is written by the EX stage at the rising clock edge. The
// register count of 16 is the reduced figure chosen for the FIR processor
// (the general-purpose starting point had 32). Register fields in the
// instruction are five bits wide: an index at or above NUM_REGS reads as zero
// and a write to it is dropped (this design's own choice). An active-low
// synchronous reset clears every register, also this design's own choice.
// A read in the cycle of a write to the same register returns the old
// value; the pipeline bypass covers that case.
module asip_regfile
  import asip_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // read ports (combinational)
  input  reg_idx_t ra_idx,
  output word_t    ra_data,
  input  reg_idx_t rb_idx,
  output word_t    rb_data,
  input  reg_idx_t dbg_idx,
  output word_t    dbg_data,
  // write port
  input  logic     we,
  input  reg_idx_t wr_idx,
  input  word_t    wr_data
);

  localparam int unsigned IW = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;

  word_t gpr [NUM_REGS];

  function automatic word_t rd(input reg_idx_t idx, input word_t regs [NUM_REGS]);
    if (32'(idx) < NUM_REGS) return regs[idx[IW-1:0]];
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) gpr[i] <= '0;
    end else if (we && (32'(wr_idx) < NUM_REGS)) begin
      gpr[wr_idx[IW-1:0]] <= wr_data;
    end
  end

  assign ra_data  = rd(ra_idx, gpr);
  assign rb_data  = rd(rb_idx, gpr);
  assign dbg_data = rd(dbg_idx, gpr);

endmodule
