// tfxp_pkg: shared types and constants of the Triple Fixed-Point (TFxP)
// multiply-accumulate unit.
//
// A TFxP word is a 16-bit value made of a 2-bit range field E (bits 15:14)
// and a 14-bit two's-complement significand X (bits 13:0). The value is
// X * 2^-b_E, with b_0 = 13, b_1 = 9 and b_2 = 5 fractional bits (format
// "16_13_9_5"). Range 0 therefore covers [-1, 1), range 1 [-16, 16) and
// range 2 [-256, 256). E = 3 is reserved for overflow (S = 0) and underflow
// (S = 1), where S is the significand's sign bit.
//
// The accumulator of the MAC unit is 48 bits wide with its radix point fixed
// after bit 25 (25 fractional bits). All widths and field positions below
// follow the format definition and the accumulator layout; the encodings of
// the shift-multiplexer selects are this design's own.
package tfxp_pkg;

  // ---- word format ---------------------------------------------------------
  localparam int unsigned WORD_W = 16;  // total TFxP word width
  localparam int unsigned EXP_W  = 2;   // range field width
  localparam int unsigned SIG_W  = 14;  // signed significand width
  localparam int unsigned FRAC0  = 13;  // fractional bits, range 0
  localparam int unsigned FRAC1  = 9;   // fractional bits, range 1
  localparam int unsigned FRAC2  = 5;   // fractional bits, range 2

  // ---- DSP slice widths and the fixed radix point -------------------------
  localparam int unsigned MUL_A_W = 25;  // multiplier input A
  localparam int unsigned MUL_B_W = 18;  // multiplier input B
  localparam int unsigned ACC_W   = 48;  // C input, adder and P register
  localparam int unsigned RADIX   = 25;  // fractional bits of the accumulator

  // Accumulator fields (Fig. "DSP slice output"): S | OF GUARD | R2 | R1 | FRACTIONAL | rest
  localparam int unsigned GUARD_W = 14;
  localparam int unsigned R_W     = 4;

  typedef logic signed [SIG_W-1:0] sig_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef enum logic [EXP_W-1:0] {
    RANGE0   = 2'd0,
    RANGE1   = 2'd1,
    RANGE2   = 2'd2,
    RANGE_OV = 2'd3   // overflow (S = 0) or underflow (S = 1)
  } range_e;

  typedef struct packed {
    range_e e;
    sig_t   x;
  } tfxp_t;

  // Pre-shift multiplexer selects
  typedef enum logic [1:0] {
    A_PASS = 2'd0,  // A
    A_SR1  = 2'd1,  // A >> 1
    A_SL3  = 2'd2,  // A << 3
    A_SL11 = 2'd3   // A << 11
  } a_sel_e;

  typedef enum logic [1:0] {
    B_PASS = 2'd0,  // B
    B_SR1  = 2'd1,  // B >> 1
    B_SL4  = 2'd2   // B << 4
  } b_sel_e;

  typedef enum logic [1:0] {
    C_SL12 = 2'd0,  // C from range 0
    C_SL16 = 2'd1,  // C from range 1
    C_SL20 = 2'd2   // C from range 2
  } c_sel_e;

  // Output word for overflow and underflow: range code 3 with the sign bit.
  // The remaining 13 bits are saturated towards the respective bound.
  localparam logic [WORD_W-1:0] OFLW_WORD = 16'hDFFF;
  localparam logic [WORD_W-1:0] UFLW_WORD = 16'hE000;

endpackage
