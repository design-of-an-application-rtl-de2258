// asip_pipe_ctrl: pipeline controller of the FIR ASIP.
//
// Two jobs, both combinational:
//  * stall: the whole pipeline (PC, FE/DC, DC/EX) holds while the core-enable
//    input is low, and EX side effects are suppressed. No instruction of this
//    processor stalls or flushes the pipeline by itself.
//  * bypass: registers are read in DC but written at the end of EX, so an
//    instruction in DC that reads the register the instruction in EX is
//    writing must take the EX result instead of the register file. The
//    controller compares the DC source indices with the EX destination and
//    raises fwd_a / fwd_b. This lets back-to-back dependent instructions
//    (such as a load followed by the multiply that uses it) run without
//    stall cycles.
// Driving the stall from an enable input and resolving hazards by a bypass
// are this design's own choices.
module asip_pipe_ctrl
  import asip_pkg::*;
(
  input  logic     en,
  // DC-stage operands
  input  reg_idx_t dc_ra,
  input  logic     dc_ra_used,
  input  reg_idx_t dc_rb,
  input  logic     dc_rb_used,
  // EX-stage destination
  input  reg_idx_t ex_rd,
  input  logic     ex_rd_we,
  output logic     stall,
  output logic     fwd_a,
  output logic     fwd_b
);

  assign stall = !en;
  assign fwd_a = dc_ra_used && ex_rd_we && (dc_ra == ex_rd);
  assign fwd_b = dc_rb_used && ex_rd_we && (dc_rb == ex_rd);

endmodule
