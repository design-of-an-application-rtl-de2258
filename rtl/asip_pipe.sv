// asip_pipe: the three-stage pipeline of the FIR ASIP (FE, DC, EX).
//
//   FE  asip_fetch      program counter, program-memory address
//       asip_fe_dc_reg  instruction register IR
//   DC  asip_decoder    decode IR
//       asip_pipe_ctrl  stall and bypass control
//       asip_dc_arith   operand read with bypass, memory-address generation
//       asip_dc_ex_reg  decoded instruction, operands, address
//   EX  asip_ex_arith   ALU / multiplier / jne / load-store, write-back
//
// The register file and both memories are outside, as separate entities of
// the architecture. Every instruction takes one cycle in each stage; with no
// stalls one instruction completes per cycle, and an instruction's result is
// in the register file (or data memory) at the edge that ends its EX cycle,
// i.e. three edges after its fetch address was on pm_addr. jne is resolved
// in EX and has two delay slots. en low freezes the whole pipeline.
// Programming rule, checked by an assertion: no jne may sit in the delay
// slots of a taken jne (the design would follow the later target).
module asip_pipe
  import asip_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  // program memory
  output pc_t      pm_addr,
  input  word_t    pm_rdata,
  // register file
  output reg_idx_t rf_ra,
  input  word_t    rf_a,
  output reg_idx_t rf_rb,
  input  word_t    rf_b,
  output logic     rf_we,
  output reg_idx_t rf_widx,
  output word_t    rf_wdata,
  // data memory
  output word_t    dm_addr,
  output logic     dm_we,
  output word_t    dm_wdata,
  input  word_t    dm_rdata,
  // status
  output pc_t      pc,
  output logic     stall,
  output logic     fwd_a,
  output logic     fwd_b,
  output logic     br_taken,
  output ex_op_e   ex_op
);

  pc_t    br_target;
  word_t  ir;
  dec_t   dec;
  dc_ex_t dc_out, ex_in;
  word_t  ex_result;

  asip_fetch u_fetch (
    .clk, .rst_n, .stall, .br_taken, .br_target, .pc, .pm_addr
  );

  asip_fe_dc_reg u_fe_dc (
    .clk, .rst_n, .stall, .instr_in(pm_rdata), .ir
  );

  asip_decoder u_decoder (.ir, .dec);

  asip_pipe_ctrl u_ctrl (
    .en,
    .dc_ra(dec.ra), .dc_ra_used(dec.ra_used),
    .dc_rb(dec.rb), .dc_rb_used(dec.rb_used),
    .ex_rd(ex_in.dec.rd), .ex_rd_we(ex_in.dec.rd_we),
    .stall, .fwd_a, .fwd_b
  );

  assign rf_ra = dec.ra;
  assign rf_rb = dec.rb;

  asip_dc_arith u_dc_arith (
    .dec, .rf_a, .rf_b, .fwd_a, .fwd_b, .ex_result, .out(dc_out)
  );

  asip_dc_ex_reg u_dc_ex (.clk, .rst_n, .stall, .d(dc_out), .q(ex_in));

  asip_ex_arith u_ex_arith (
    .in(ex_in), .stall,
    .rf_we, .rf_idx(rf_widx), .result(ex_result),
    .dm_addr, .dm_we, .dm_wdata, .dm_rdata,
    .br_taken, .br_target
  );

  assign rf_wdata = ex_result;
  assign ex_op    = ex_in.dec.op;

  // delay slots still to execute after a taken jne
  logic [1:0] slots_left;
  always_ff @(posedge clk) begin
    if (!rst_n)                slots_left <= '0;
    else if (br_taken)         slots_left <= 2'd2;
    else if (!stall && slots_left != '0) slots_left <= slots_left - 2'd1;
  end

  a_no_jne_in_delay_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (slots_left != '0 && !stall) |-> (ex_op != EX_JNE))
    else $error("jne in the delay slot of a taken jne");

endmodule
