// asip_ex_arith: EX-stage arithmetic unit of the FIR ASIP.
//
// Combinational; its effects are committed at the next rising edge by the
// register file, the data memory and the fetch stage. It performs:
//   add/sub/and/or : rd <= a op b           mul : rd <= low 32 bits of a * b
//   incr           : rd <= a + 1            movi: rd <= imm
//   ldr            : rd <= DM[addr]         ldm : DM[addr] <= imm[15:0]
//   mvm            : DM[addr] <= a          jne : if (a != b) PC <= imm[15:0]
// result is also sent back to the DC stage for the bypass. Every write and
// the branch are suppressed while the pipeline is stalled. The multiply keeps
// the low 32 bits of the product, which is the same for signed and unsigned
// operands; that width choice is this design's own.
module asip_ex_arith
  import asip_pkg::*;
(
  input  dc_ex_t in,
  input  logic   stall,
  // register write-back
  output logic     rf_we,
  output reg_idx_t rf_idx,
  output word_t    result,
  // data memory
  output word_t  dm_addr,
  output logic   dm_we,
  output word_t  dm_wdata,
  input  word_t  dm_rdata,
  // branch
  output logic   br_taken,
  output pc_t    br_target
);

  always_comb begin
    unique case (in.dec.op)
      EX_ADD:  result = in.a + in.b;
      EX_SUB:  result = in.a - in.b;
      EX_AND:  result = in.a & in.b;
      EX_OR:   result = in.a | in.b;
      EX_MUL:  result = in.a * in.b;
      EX_INCR: result = in.a + word_t'(1);
      EX_MOVI: result = in.dec.imm;
      EX_LDR:  result = dm_rdata;
      default: result = '0;
    endcase
  end

  assign rf_we     = in.dec.rd_we && !stall;
  assign rf_idx    = in.dec.rd;

  assign dm_addr   = in.addr;
  assign dm_we     = ((in.dec.op == EX_LDM) || (in.dec.op == EX_MVM)) && !stall;
  assign dm_wdata  = (in.dec.op == EX_LDM) ? word_t'(in.dec.imm[15:0]) : in.a;

  assign br_taken  = (in.dec.op == EX_JNE) && (in.a != in.b) && !stall;
  assign br_target = in.dec.imm[PC_W-1:0];

endmodule
