// asip_dc_arith: DC-stage arithmetic unit of the FIR ASIP.
//
// Combinational. It selects the two operand values, from the register file
// or, when the pipeline controller asks for it, from the EX-stage result
// (bypass), and it computes the data-memory address the EX stage will use:
//   ldr: a + b (src1 + src2)      mvm: b + imm (dest register + addr_value)
//   ldm: imm[31:16] (imm_addr)    others: 0
// Computing the address one stage early keeps the EX stage to a single
// adder/multiplier plus the memory access; that split is this design's own.
module asip_dc_arith
  import asip_pkg::*;
(
  input  dec_t   dec,
  input  word_t  rf_a,
  input  word_t  rf_b,
  input  logic   fwd_a,
  input  logic   fwd_b,
  input  word_t  ex_result,
  output dc_ex_t out
);

  word_t a, b;

  assign a = fwd_a ? ex_result : rf_a;
  assign b = fwd_b ? ex_result : rf_b;

  always_comb begin
    out.dec = dec;
    out.a   = a;
    out.b   = b;
    unique case (dec.op)
      EX_LDR:  out.addr = a + b;
      EX_MVM:  out.addr = b + dec.imm;
      EX_LDM:  out.addr = word_t'(dec.imm[31:16]);
      default: out.addr = '0;
    endcase
  end

endmodule
