// asip_pkg: shared widths, instruction encodings and the decoded-control
// record of the three-stage FIR ASIP.
//
// Instruction word (32 bits). The major opcode sits in bits [31:26]; ldm uses
// only the four bits [31:28]. Register fields are five bits wide, so the
// instruction format can name 32 registers even when the register file is
// built with fewer (unused high registers read as zero).
//
//   ALU group  000000 src1[25:21] src2[20:16] dest[15:11] 00000 func[5:0]
//              func 000000 nop, 000001 add, 000110 mul (when src2/dest are
//              not both zero), 000110 incr (src2 == dest == 0: src1 += 1);
//              sub 000010, and 000011, or 000100 are this design's own codes.
//   ldr        100100 src1 src2 dest 0...     dest <= DM[src1 + src2]
//   ldm        1101 imm_addr[27:16] imm_value[15:0]   DM[imm_addr] <= imm_value
//   mvm        100011 src[25:21] dest[20:16] 0000 addr_value[11:0]
//                                             DM[dest + addr_value] <= src
//   jne        111000 src[25:21] dest[20:16] addr[15:0]
//                                             if (dest != src) PC <= addr
//   movi       100001 00000 dest[20:16] xxxx immvalue[11:0]  dest <= imm
//
// The field positions and the codes of nop, add, mul, incr, ldr, ldm, mvm,
// jne and movi are those of the FIR program listing this processor was built
// to run; everything marked "this design's own" is a choice made here.
package asip_pkg;

  localparam int unsigned XLEN      = 32;  // data and instruction width
  localparam int unsigned REG_AW    = 5;   // register field width
  localparam int unsigned PC_W      = 16;  // program counter / jne target width

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [REG_AW-1:0] reg_idx_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Major opcodes, bits [31:26]
  localparam logic [5:0] OP_ALU  = 6'b000000;
  localparam logic [5:0] OP_LDR  = 6'b100100;
  localparam logic [5:0] OP_MVM  = 6'b100011;
  localparam logic [5:0] OP_JNE  = 6'b111000;
  localparam logic [5:0] OP_MOVI = 6'b100001;
  // ldm, bits [31:28]
  localparam logic [3:0] OP_LDM  = 4'b1101;

  // ALU-group function codes, bits [5:0]
  localparam logic [5:0] FN_NOP  = 6'b000000;
  localparam logic [5:0] FN_ADD  = 6'b000001;
  localparam logic [5:0] FN_SUB  = 6'b000010;
  localparam logic [5:0] FN_AND  = 6'b000011;
  localparam logic [5:0] FN_OR   = 6'b000100;
  localparam logic [5:0] FN_MUL  = 6'b000110;  // also incr, see above

  // Operation performed in EX
  typedef enum logic [3:0] {
    EX_NOP,
    EX_ADD,
    EX_SUB,
    EX_AND,
    EX_OR,
    EX_MUL,
    EX_INCR,
    EX_LDR,
    EX_LDM,
    EX_MVM,
    EX_JNE,
    EX_MOVI
  } ex_op_e;

  // Decoded instruction, produced in DC by the decoder
  typedef struct packed {
    ex_op_e   op;
    reg_idx_t ra;       // first register operand
    logic     ra_used;
    reg_idx_t rb;       // second register operand
    logic     rb_used;
    reg_idx_t rd;       // register written in EX
    logic     rd_we;
    word_t    imm;      // zero-extended immediate (value, offset or target)
  } dec_t;

  localparam dec_t DEC_NOP = '{op: EX_NOP, ra: '0, ra_used: 1'b0, rb: '0,
                               rb_used: 1'b0, rd: '0, rd_we: 1'b0, imm: '0};

  // Contents of the DC/EX pipeline register
  typedef struct packed {
    dec_t  dec;
    word_t a;           // value of ra (after bypass)
    word_t b;           // value of rb (after bypass)
    word_t addr;        // data memory address prepared in DC
  } dc_ex_t;

  localparam dc_ex_t DC_EX_NOP = '{dec: DEC_NOP, a: '0, b: '0, addr: '0};

endpackage
