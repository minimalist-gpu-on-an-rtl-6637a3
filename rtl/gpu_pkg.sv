// gpu_pkg: types and constants shared by the minimalist GPU.
//
// Numbers are 16-bit two's-complement fixed point with 10 fractional bits
// (value = raw / 1024), so -1.25 is 16'hFB00 and 4.0 is 16'h1000.
//
// An instruction is 32 bits: op[31:28] | reg_a[27:24] | imm[23:8] |
// reg_b[7:4] | reg_c[3:0]. The field order and widths, and the codes of NOP,
// END, XOR, ADDI, BGE and JUMP (0..5), follow the worked loop example of the
// ISA; the codes of the other nine instructions are this design's choice.
//
// The input buffer and the output buffer are NUM_FMA triplets of 16-bit
// words. Word 3*i+k of a buffer belongs to FMA i: k = 0 is A, 1 is B, 2 is C
// on the input side, and the first, second and third output of a round of
// three on the output side.
package gpu_pkg;

  localparam int WORD_W    = 16;  // data word width
  localparam int FRAC_BITS = 10;  // fractional bits of the fixed-point format
  localparam int NUM_REGS  = 16;  // controller registers

  typedef logic signed [WORD_W-1:0] fixed_t;

  // Fixed-point 4.0, the escape threshold tested by OR.
  localparam fixed_t FIX_FOUR = fixed_t'(4 <<< FRAC_BITS);

  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_END       = 4'd1,
    OP_XOR       = 4'd2,
    OP_ADDI      = 4'd3,
    OP_BGE       = 4'd4,
    OP_JUMP      = 4'd5,
    OP_ADD       = 4'd6,
    OP_PAUSE     = 4'd7,
    OP_LOADI     = 4'd8,
    OP_LOAD      = 4'd9,
    OP_LOADB     = 4'd10,
    OP_WRITE     = 4'd11,
    OP_OR        = 4'd12,
    OP_SENDITERS = 4'd13,
    OP_FBSWAP    = 4'd14
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  reg_a;
    logic [15:0] imm;
    logic [3:0]  reg_b;
    logic [3:0]  reg_c;
  } instr_t;

  // Values of the registers named by reg_a, reg_b and reg_c, sent with every
  // memory instruction (the 48-bit controller_regs bus).
  typedef struct packed {
    logic [WORD_W-1:0] a;
    logic [WORD_W-1:0] b;
    logic [WORD_W-1:0] c;
  } ctrl_regs_t;

  // Shuffle code of LOADB, one per FMA operand, carried in a 4-bit register
  // field: src picks the first, second or third previous output or zero,
  // mode leaves the value, doubles it or negates it.
  typedef enum logic [1:0] {
    SRC_OUT0 = 2'd0,
    SRC_OUT1 = 2'd1,
    SRC_OUT2 = 2'd2,
    SRC_ZERO = 2'd3
  } shuf_src_e;

  typedef enum logic [1:0] {
    MODE_PASS = 2'd0,
    MODE_X2   = 2'd1,
    MODE_NEG  = 2'd2
  } shuf_mode_e;

  typedef struct packed {
    shuf_mode_e mode;
    shuf_src_e  src;
  } shuf_code_t;

  function automatic instr_t make_instr(opcode_e op, logic [3:0] a,
                                        logic [15:0] imm, logic [3:0] b,
                                        logic [3:0] c);
    instr_t i;
    i.op    = op;
    i.reg_a = a;
    i.imm   = imm;
    i.reg_b = b;
    i.reg_c = c;
    return i;
  endfunction

endpackage
