// tfxp_range_detect: output range selection and over/underflow check of the
// TFxP MAC unit (the "OFLW / UFLW / MODE" block).
//
// The 48-bit accumulator holds a signed fixed-point number with 25
// fractional bits, laid out from the top as
//   S [47] | OF GUARD [46:33] | R2 [32:29] | R1 [28:25] | FRACTIONAL [24:12] | [11:0]
// A result fits a range when every bit above that range's significand is a
// copy of the sign bit:
//   range 0 (significand P[25:12]) needs OF GUARD, R2 and R1 equal to S,
//   range 1 (significand P[29:16]) needs OF GUARD and R2 equal to S,
//   range 2 (significand P[33:20]) needs OF GUARD equal to S.
// The smallest range that fits is chosen. If OF GUARD differs from S the
// value does not fit at all: overflow when S = 0, underflow when S = 1.
// The field layout and the rule follow the original TFxP MAC description.
//
// Purely combinational.
module tfxp_range_detect
  import tfxp_pkg::*;
(
  input  acc_t   p,
  output range_e range,  // RANGE0..RANGE2, or RANGE_OV when it does not fit
  output logic   ovf,    // result above the largest range-2 value
  output logic   unf     // result below the smallest range-2 value
);

  localparam int unsigned R1_LO    = RADIX;            // 25
  localparam int unsigned R2_LO    = R1_LO + R_W;      // 29
  localparam int unsigned GUARD_LO = R2_LO + R_W;      // 33

  logic                s;
  logic [GUARD_W-1:0]  guard;
  logic [R_W-1:0]      r2, r1;
  logic                guard_ok, r2_ok, r1_ok;

  always_comb begin
    s     = p[ACC_W-1];
    guard = p[GUARD_LO +: GUARD_W];
    r2    = p[R2_LO +: R_W];
    r1    = p[R1_LO +: R_W];

    guard_ok = (guard == {GUARD_W{s}});
    r2_ok    = (r2 == {R_W{s}});
    r1_ok    = (r1 == {R_W{s}});

    ovf = !guard_ok && !s;
    unf = !guard_ok &&  s;

    if (!guard_ok)           range = RANGE_OV;
    else if (r2_ok && r1_ok) range = RANGE0;
    else if (r2_ok)          range = RANGE1;
    else                     range = RANGE2;
  end

endmodule
