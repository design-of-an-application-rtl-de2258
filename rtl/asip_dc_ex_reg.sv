// asip_dc_ex_reg: pipeline register between the DC and EX stages.
//
// Carries the decoded instruction, its two operand values and the prepared
// data-memory address (asip_pkg::dc_ex_t). It loads at every rising edge,
// holds while stalled and resets to a nop (this design's own choice).
module asip_dc_ex_reg
  import asip_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   stall,
  input  dc_ex_t d,
  output dc_ex_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= DC_EX_NOP;
    else if (!stall) q <= d;
  end

endmodule
