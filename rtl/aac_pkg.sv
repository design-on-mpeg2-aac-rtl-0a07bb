// aac_pkg: types and constants shared by the AAC decoder DSP core and the
// IMDCT performer.
//
// Numbers are IEEE single-precision words (1 sign, 8 exponent, 23 stored
// mantissa bits, i.e. a 24-bit mantissa with the hidden one), the format the
// core uses on all its 32-bit buses. Fixed-point words are 24-bit two's
// complement Q1.23 values held in the low 24 bits of a bus word.
//
// The core is controlled by one wide control word per clock (ctrl_word_t),
// carried on the control bus. Its field layout is this design's own choice;
// the unit names (APL, BPL, CPL, RS, RD, MPD, ARUL, ARUR, RH0..RH3, SR) are
// the ones of the core's block diagram. The buffer base addresses are those of
// the transform memory map.
package aac_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned DW  = 32;   // bus A, B, C and external data width
  localparam int unsigned AW  = 14;   // external word address width
  localparam int unsigned FXW = 24;   // fixed-point / shifter width

  // ------------------------------------------------ transform memory map
  localparam logic [AW-1:0] TRANSFORM_BUF = 14'h1000;
  localparam logic [AW-1:0] LEFT_BUF      = 14'h1400;
  localparam logic [AW-1:0] RIGHT_BUF     = 14'h1800;

  // ------------------------------------------------------------- floats
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  localparam logic [31:0] FP_ONE = 32'h3F80_0000;

  // ------------------------------------------------------------ FPU ops
  // Adder operand sources: X register or product register P (multiplier
  // feedback); Y register or accumulator ACC (adder feedback).
  typedef enum logic [0:0] {ADD_A_X = 1'b0, ADD_A_P = 1'b1} add_a_sel_e;
  typedef enum logic [0:0] {ADD_B_Y = 1'b0, ADD_B_ACC = 1'b1} add_b_sel_e;

  typedef struct packed {
    logic        ld_x;     // X <= bus A
    logic        ld_y;     // Y <= bus B
    logic        mul;      // start P <= X * Y
    logic        add;      // start ACC <= opa +/- opb
    logic        sub;      // subtract instead of add
    add_a_sel_e  a_sel;
    add_b_sel_e  b_sel;
    logic        fix;      // 24-bit fixed point instead of float
    logic        clr;      // ACC <= 0
  } fpu_ctrl_t;

  // ------------------------------------------------------------ SEU ops
  typedef enum logic [2:0] {
    SEU_NOP   = 3'd0,
    SEU_LD    = 3'd1,   // SR <= bus A[23:0]
    SEU_EXP   = 3'd2,   // SE <= redundant sign bits of SR
    SEU_SHI   = 3'd3,   // SO <= SR shifted by the signed immediate amount
    SEU_SHE   = 3'd4,   // SO <= SR shifted left by SE (normalise)
    SEU_SHB   = 3'd5    // SO <= SR shifted by the signed amount on bus B[7:0]
  } seu_op_e;

  // ------------------------------------------------------------ ALU ops
  typedef enum logic [3:0] {
    ALU_NOP = 4'd0,
    ALU_ADD = 4'd1,
    ALU_SUB = 4'd2,
    ALU_AND = 4'd3,
    ALU_OR  = 4'd4,
    ALU_XOR = 4'd5,
    ALU_SHL = 4'd6,
    ALU_SHR = 4'd7,   // arithmetic
    ALU_PSA = 4'd8,   // pass ARUL
    ALU_NOT = 4'd9
  } alu_op_e;

  // ------------------------------------------------------------ ACU ops
  typedef struct packed {
    logic       en;       // this pointer unit issues an address
    logic [1:0] ptr;      // which RSn it uses
    logic       post;     // RSn <= RSn + RDn afterwards (modulo MPDn)
    logic       brev;     // bit-reversed address (APL only)
  } pl_ctrl_t;

  typedef enum logic [1:0] {
    ACU_LD_NONE = 2'd0,
    ACU_LD_RS   = 2'd1,
    ACU_LD_RD   = 2'd2,
    ACU_LD_MPD  = 2'd3
  } acu_ld_e;

  // ------------------------------------------------------- bus sources
  typedef enum logic [1:0] {A_MEM = 2'd0, A_GPR = 2'd1, A_IMM = 2'd2, A_ZERO = 2'd3} a_src_e;
  typedef enum logic [1:0] {B_MEM = 2'd0, B_GPR = 2'd1, B_IMM = 2'd2, B_ZERO = 2'd3} b_src_e;
  typedef enum logic [2:0] {
    C_P    = 3'd0,   // FPU product register
    C_ACC  = 3'd1,   // FPU accumulator
    C_SEU  = 3'd2,   // shifter output, sign-extended
    C_SE   = 3'd3,   // exponent detector result
    C_ALU  = 3'd4,   // ALU result, sign-extended
    C_BUSA = 3'd5,   // bus A (move)
    C_BUSB = 3'd6    // bus B (move)
  } c_src_e;

  // --------------------------------------------------------- control word
  typedef struct packed {
    a_src_e      a_src;
    b_src_e      b_src;
    c_src_e      c_src;
    logic [1:0]  gpr_a;     // RHn onto bus A
    logic [1:0]  gpr_b;     // RHn onto bus B
    logic        gpr_we;    // RHn <= bus C
    logic [1:0]  gpr_w;
    pl_ctrl_t    apl;       // read external A at APL address
    pl_ctrl_t    bpl;       // read external B at BPL address
    pl_ctrl_t    cpl;       // write bus C at CPL address
    logic        wr_a;      // CPL write goes to external A
    logic        wr_b;      // CPL write goes to external B
    acu_ld_e     acu_ld;    // load an ACU register from bus C
    logic [1:0]  acu_idx;
    fpu_ctrl_t   fpu;
    seu_op_e     seu;
    alu_op_e     alu;
    logic        alu_ld;    // ARUL <= bus A[15:0], ARUR <= bus B[15:0]
    logic [31:0] imm;
  } ctrl_word_t;

  localparam ctrl_word_t CTRL_NOP = '0;

endpackage
