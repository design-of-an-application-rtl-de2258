// asip_fe_dc_reg: pipeline register between the FE and DC stages.
//
// Holds the instruction register IR (the fetched instruction word). It loads at every rising edge, holds while
// stalled, and resets to the all-zero word, which decodes as nop, so the
// pipeline starts empty (this design's own choice).
module asip_fe_dc_reg
  import asip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  word_t instr_in,
  output word_t ir
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir <= '0;
    end else if (!stall) begin
      ir <= instr_in;
    end
  end

endmodule
