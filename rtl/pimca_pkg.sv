// pimca_pkg -- types and constants shared by the PIMCA programmable in-memory
// computing accelerator: instruction formats, SIMD opcodes and operand selectors.
// The field set follows the accelerator's ISA (R/W addresses and AM enables, PE and
// macro selection with accumulation mode, SIMD operands and opcode, a 6-bit repeat
// count, loop-setup / loop-end instructions). Field widths and encodings, the row
// pitch / row rotation fields used to form bank addresses, and the per-loop address
// strides are choices of this implementation.
package pimca_pkg;
  localparam int NPE        = 6;
  localparam int NMACRO     = 18;    // 3 x 6 macros per PE
  localparam int MROWS      = 256;   // macro rows  (input channels)
  localparam int MCOLS      = 128;   // macro columns (output channels)
  localparam int WAYS       = 256;   // SIMD ways
  localparam int AM_BANKS   = 6;
  localparam int AM_DEPTH   = 1024;
  localparam int AM_WIDTH   = 128;
  localparam int AW         = 10;    // activation memory address width
  localparam int LOOP_LEVELS = 8;
  localparam int IMEM_DEPTH = 1024;
  localparam int PW         = 10;    // program counter width

  typedef enum logic [1:0] {
    I_REG  = 2'd0,   // regular PE + SIMD instruction
    I_LS   = 2'd1,   // loop setup
    I_LE   = 2'd2,   // loop end check
    I_HALT = 2'd3
  } itype_e;

  typedef enum logic [2:0] {
    S_ADD    = 3'd0,  // Z = X + Y
    S_ADD2   = 3'd1,  // Z = 2X + Y
    S_COMP   = 3'd2,  // Z = (X > Y)
    S_CMP2   = 3'd3,  // Z = (X>R0)+(X>R1)+(X>R2)
    S_LOAD   = 3'd4,  // Z = X
    S_MAX    = 3'd5,  // Z = max(X, Y)
    S_RSHIFT = 3'd6,  // Z = X >>> Y
    S_LSHIFT = 3'd7   // Z = (X << 1) | data-memory bit
  } simd_op_e;

  // X operand: R0..R4, PE output, activation-memory bit, immediate
  typedef enum logic [2:0] {
    X_R0 = 3'd0, X_R1 = 3'd1, X_R2 = 3'd2, X_R3 = 3'd3, X_R4 = 3'd4,
    X_PE = 3'd5, X_AM = 3'd6, X_IMM = 3'd7
  } xsel_e;
  // Y operand: R0..R4, PE output of the partner way (i xor 128), own PE output, immediate
  typedef enum logic [2:0] {
    Y_R0 = 3'd0, Y_R1 = 3'd1, Y_R2 = 3'd2, Y_R3 = 3'd3, Y_R4 = 3'd4,
    Y_PEX = 3'd5, Y_PE = 3'd6, Y_IMM = 3'd7
  } ysel_e;

  typedef struct packed {
    itype_e          itype;
    // activation memory
    logic            rd_en;
    logic            rd_grp;      // 0: top group, 1: bottom group
    logic [AW-1:0]   rd_addr;     // address of the first (top) feature-map row
    logic [1:0]      rd_rot;      // feature-map row index mod 3 of the first row
    logic [AW-1:0]   rd_pitch;    // words per feature-map row triplet (map width)
    logic            wr_en;
    logic [AW-1:0]   wr_addr;
    logic [1:0]      wr_pair;     // bank pair = feature-map row mod 3
    logic [1:0]      wr_half;     // channel halves written (bit0: 0..127, bit1: 128..255)
    // PE
    logic            pe_en;
    logic [2:0]      pe_sel;
    logic [NMACRO-1:0] macro_en;
    logic            acc18;       // 0: 256-d 9-input, 1: 128-d 18-input
    logic            in_shift;    // shift the AM patch into the input registers
    // SIMD
    logic            simd_en;
    simd_op_e        op;
    xsel_e           xsel;
    ysel_e           ysel;
    logic [2:0]      zsel;        // 0..4 = R0..R4
    logic [7:0]      imm;
    logic [5:0]      rep;         // executes rep+1 times, addresses +1 each time
    // loop instructions
    logic [2:0]      lvl;
    logic [15:0]     lcount;      // LS: iteration count
    logic [PW-1:0]   ltarget;     // LE: first instruction of the loop body
    logic [AW-1:0]   rd_stride;   // LS: read-address step per iteration
    logic [AW-1:0]   wr_stride;   // LS: write-address step per iteration
  } instr_t;


  // micro-operation issued to the pipeline after repeat/loop expansion
  typedef struct packed {
    logic            valid;
    logic            rd_en;
    logic            rd_grp;
    logic [AW-1:0]   rd_addr;
    logic [1:0]      rd_rot;
    logic [AW-1:0]   rd_pitch;
    logic            wr_en;
    logic [AW-1:0]   wr_addr;
    logic [1:0]      wr_pair;
    logic [1:0]      wr_half;
    logic            pe_en;
    logic [2:0]      pe_sel;
    logic [NMACRO-1:0] macro_en;
    logic            acc18;
    logic            in_shift;
    logic            simd_en;
    simd_op_e        op;
    xsel_e           xsel;
    ysel_e           ysel;
    logic [2:0]      zsel;
    logic [7:0]      imm;
  } uop_t;
endpackage
