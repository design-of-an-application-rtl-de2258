// asip_top: the FIR application-specific processor.
//
// A 32-bit, three-stage (FE/DC/EX) pipelined processor with a nine-operation
// instruction set trimmed for FIR filtering (nop, incr, add, mul, movi, ldm,
// ldr, mvm, jne; sub/and/or are kept in the ALU as this design's own
// addition), 16 general-purpose registers and separate program and data
// memories. The top wires the pipeline to the register file and the two
// memories, the three entities of the architecture.
//
// Use: hold en low, load the program through pm_we/pm_waddr/pm_wdata (one
// word per rising edge), pulse rst_n low to clear PC, pipeline and
// registers, then raise en. The processor fetches from address 0 and runs;
// there is no halt instruction, so a program ends in a loop or in nops and
// the host watches pc. dbg_reg_* and dbg_dm_* read a register and a data word
// combinationally at any time. Status outputs show the PC, whether the
// pipeline is stalled, bypass use, taken branches and the EX operation.
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16,
  parameter int unsigned PM_DEPTH = 32,
  parameter int unsigned DM_DEPTH = 67
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  // program load port
  input  logic     pm_we,
  input  pc_t      pm_waddr,
  input  word_t    pm_wdata,
  // inspection ports
  input  reg_idx_t dbg_reg_idx,
  output word_t    dbg_reg_data,
  input  word_t    dbg_dm_addr,
  output word_t    dbg_dm_data,
  // status
  output pc_t      pc,
  output logic     stall,
  output logic     fwd_a,
  output logic     fwd_b,
  output logic     br_taken,
  output ex_op_e   ex_op
);

  pc_t      pm_addr;
  word_t    pm_rdata;
  reg_idx_t rf_ra, rf_rb, rf_widx;
  word_t    rf_a, rf_b, rf_wdata;
  logic     rf_we;
  word_t    dm_addr, dm_wdata, dm_rdata;
  logic     dm_we;

  asip_prog_mem #(.DEPTH(PM_DEPTH)) u_pm (
    .clk, .rd_addr(pm_addr), .rd_data(pm_rdata),
    .we(pm_we), .wr_addr(pm_waddr), .wr_data(pm_wdata)
  );

  asip_data_mem #(.DEPTH(DM_DEPTH)) u_dm (
    .clk, .addr(dm_addr), .we(dm_we), .wdata(dm_wdata), .rdata(dm_rdata),
    .dbg_addr(dbg_dm_addr), .dbg_rdata(dbg_dm_data)
  );

  asip_regfile #(.NUM_REGS(NUM_REGS)) u_rf (
    .clk, .rst_n,
    .ra_idx(rf_ra), .ra_data(rf_a), .rb_idx(rf_rb), .rb_data(rf_b),
    .dbg_idx(dbg_reg_idx), .dbg_data(dbg_reg_data),
    .we(rf_we), .wr_idx(rf_widx), .wr_data(rf_wdata)
  );

  asip_pipe u_pipe (
    .clk, .rst_n, .en,
    .pm_addr, .pm_rdata,
    .rf_ra, .rf_a, .rf_rb, .rf_b, .rf_we, .rf_widx, .rf_wdata,
    .dm_addr, .dm_we, .dm_wdata, .dm_rdata,
    .pc, .stall, .fwd_a, .fwd_b, .br_taken, .ex_op
  );

endmodule
