// qmc_pkg: shared widths, fixed-point formats, types and the host register
// map of the pair-function accelerator.
//
// Fixed-point formats (Q notation, s = signed, u = unsigned):
//   positions            s12.20  32 bits
//   squared distances    u27.26  53 bits
//   coefficients/values  s0.51   52 bits
// These follow the published formats. The reciprocal bin widths (u24.40) and
// the interpolation delta (u0.52) are this design's own choices.
package qmc_pkg;

  // ---------------- formats ----------------
  localparam int unsigned POS_W      = 32;  // s12.20
  localparam int unsigned POS_FRAC   = 20;
  localparam int unsigned R2_W       = 53;  // u27.26
  localparam int unsigned R2_FRAC    = 26;
  localparam int unsigned C_W        = 52;  // s0.51
  localparam int unsigned C_FRAC     = 51;
  localparam int unsigned RECIP_W    = 64;  // u24.40
  localparam int unsigned RECIP_FRAC = 40;
  localparam int unsigned DELTA_W    = 52;  // u0.52

  // ---------------- lookup table shape ----------------
  localparam int unsigned R1_BINS     = 256;
  localparam int unsigned R1_BIN_BITS = 8;
  localparam int unsigned R2_REGIMES  = 21;
  localparam int unsigned R2_BINS     = 64;
  localparam int unsigned R2_BIN_BITS = 6;
  localparam int unsigned REGIME_BITS = 5;
  localparam int unsigned COEF_DEPTH  = R1_BINS + R2_REGIMES * R2_BINS;  // 1600
  localparam int unsigned COEF_AW     = 11;

  // ---------------- system size ----------------
  localparam int unsigned N_MAX_DEF  = 4000;
  localparam int unsigned CALCFUNC_LATENCY = 49;

  // ---------------- accumulator widths ----------------
  localparam int unsigned MANT_W = 52;  // u0.52 product mantissa
  localparam int unsigned EXP_W  = 32;  // left-shift count
  localparam int unsigned SUM_W  = 75;  // s23.51 region II sum

  typedef logic signed [POS_W-1:0] pos_t;
  typedef logic        [R2_W-1:0]  r2_t;
  typedef logic signed [C_W-1:0]   coef_t;
  typedef logic        [RECIP_W-1:0] recip_t;
  typedef logic        [DELTA_W-1:0] delta_t;

  typedef struct packed {
    pos_t x;
    pos_t y;
    pos_t z;
  } pos3_t;

  typedef struct packed {
    coef_t c0;
    coef_t c1;
    coef_t c2;
  } coef3_t;

  // Host write into the position memory: one 32-bit coordinate.
  typedef struct packed {
    logic        en;
    logic [11:0] atom;
    logic [1:0]  coord;  // 0 = x, 1 = y, 2 = z
    pos_t        data;
  } pos_wr_t;

  // Host write into a coefficient memory: one 52-bit coefficient.
  typedef struct packed {
    logic               en;
    logic [COEF_AW-1:0] entry;
    logic [1:0]         sel;   // 0 = c0, 1 = c1, 2 = c2
    coef_t              data;
  } coef_wr_t;

  // Host write into the regime-constant memory.
  typedef struct packed {
    logic                   en;
    logic [REGIME_BITS-1:0] regime;
    logic                   field;  // 0 = start (u27.26), 1 = reciprocal bin width
    logic [RECIP_W-1:0]     data;
  } regime_wr_t;

  // ---------------- OPB register map (byte offsets) ----------------
  // 64-bit and wider values are written low word first; the write of the
  // high word commits the whole value.
  localparam logic [19:0] A_CTRL      = 20'h0_0000;  // W: bit0 start
  localparam logic [19:0] A_STATUS    = 20'h0_0004;  // R: bit0 busy, bit1 done
  localparam logic [19:0] A_NATOMS    = 20'h0_0008;  // RW
  localparam logic [19:0] A_SIGMA2_LO = 20'h0_0010;
  localparam logic [19:0] A_SIGMA2_HI = 20'h0_0014;
  localparam logic [19:0] A_RECIP1_LO = 20'h0_0018;
  localparam logic [19:0] A_RECIP1_HI = 20'h0_001C;
  localparam logic [19:0] A_MANT_LO   = 20'h0_0020;  // R
  localparam logic [19:0] A_MANT_HI   = 20'h0_0024;
  localparam logic [19:0] A_EXP       = 20'h0_0028;
  localparam logic [19:0] A_SUM_0     = 20'h0_0030;
  localparam logic [19:0] A_SUM_1     = 20'h0_0034;
  localparam logic [19:0] A_SUM_2     = 20'h0_0038;
  // windows
  localparam logic [3:0]  W_POS    = 4'h1;  // 0x1_0000 + atom*16 + coord*4
  localparam logic [3:0]  W_REGIME = 4'h2;  // 0x2_0000 + regime*16 + field*8 + half*4
  localparam logic [3:0]  W_COEF   = 4'h4;  // 0x4_0000..0x4_FFFF: entry*32 + sel*8 + half*4

endpackage
