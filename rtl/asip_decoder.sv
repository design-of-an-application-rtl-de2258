// asip_decoder: instruction decoder of the FIR ASIP (DC stage).
//
// Purely combinational. It splits the instruction register into the EX
// operation, the register operands it reads (ra, rb), the register it
// writes (rd) and a zero-extended immediate. The field layout and the
// opcodes of nop, add, mul, incr, ldr, ldm, mvm, jne and movi follow the
// encodings of the processor's FIR program (see asip_pkg). Two points are
// this design's own:
//  * mul and incr share function code 000110; the word is taken as incr when
//    its src2 and dest fields are both zero, otherwise as mul (so
//    "mul rX, rY, r0" with rY = r0 cannot be expressed);
//  * sub, and, or use the assumed function codes 2, 3, 4, and any other
//    unknown word decodes as nop.
// Operand mapping: ALU/ldr: ra = src1, rb = src2. incr: ra = rd = src.
// mvm: ra = src (data), rb = dest (base). jne: ra = src, rb = dest.
module asip_decoder
  import asip_pkg::*;
(
  input  word_t ir,
  output dec_t  dec
);

  logic [5:0] op6;
  logic [5:0] fn;
  reg_idx_t   f_hi, f_mid, f_lo;

  assign op6   = ir[31:26];
  assign fn    = ir[5:0];
  assign f_hi  = ir[25:21];
  assign f_mid = ir[20:16];
  assign f_lo  = ir[15:11];

  always_comb begin
    dec = DEC_NOP;
    if (ir[31:28] == OP_LDM) begin
      dec.op  = EX_LDM;
      dec.imm = word_t'(ir[15:0]);
      // ldm packs both operands: imm[31:16] = data address, imm[15:0] = value
      dec.imm[31:16] = {4'b0, ir[27:16]};
    end else begin
      unique case (op6)
        OP_ALU: begin
          dec.ra = f_hi; dec.rb = f_mid; dec.rd = f_lo;
          dec.ra_used = 1'b1; dec.rb_used = 1'b1; dec.rd_we = 1'b1;
          unique case (fn)
            FN_NOP: dec = DEC_NOP;
            FN_ADD: dec.op = EX_ADD;
            FN_SUB: dec.op = EX_SUB;
            FN_AND: dec.op = EX_AND;
            FN_OR:  dec.op = EX_OR;
            FN_MUL: begin
              if (f_mid == '0 && f_lo == '0) begin
                dec.op = EX_INCR;
                dec.rb_used = 1'b0;
                dec.rd = f_hi;
              end else begin
                dec.op = EX_MUL;
              end
            end
            default: dec = DEC_NOP;
          endcase
        end
        OP_LDR: begin
          dec.op = EX_LDR;
          dec.ra = f_hi; dec.rb = f_mid; dec.rd = f_lo;
          dec.ra_used = 1'b1; dec.rb_used = 1'b1; dec.rd_we = 1'b1;
        end
        OP_MVM: begin
          dec.op = EX_MVM;
          dec.ra = f_hi; dec.rb = f_mid;
          dec.ra_used = 1'b1; dec.rb_used = 1'b1;
          dec.imm = word_t'(ir[11:0]);
        end
        OP_JNE: begin
          dec.op = EX_JNE;
          dec.ra = f_hi; dec.rb = f_mid;
          dec.ra_used = 1'b1; dec.rb_used = 1'b1;
          dec.imm = word_t'(ir[15:0]);
        end
        OP_MOVI: begin
          dec.op = EX_MOVI;
          dec.rd = f_mid; dec.rd_we = 1'b1;
          dec.imm = word_t'(ir[11:0]);
        end
        default: dec = DEC_NOP;
      endcase
    end
  end

endmodule
