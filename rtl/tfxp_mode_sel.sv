// tfxp_mode_sel: range decoder ("MODE" block) of the TFxP MAC unit.
//
// From the range fields of the multiplier operands A and B, and of the
// addend C, it chooses the pre-shift applied to each so that the product
// A*B always carries exactly 25 fractional bits and C lines up with it.
//
// Product fraction before shifting is b_A + b_B, one of 26, 22, 18, 14 or 10.
// The A input may be shifted left by 3 or 11 (25-bit port, 14-bit operand)
// and B by 4 (18-bit port). Only 15 bits of left shift are available but 16
// would be needed to bring the 10-bit case to 26, so the common radix is 25
// and the 26-bit case (both operands in range 0) shifts one operand right by
// one bit: A when its LSB is 0 (exact), otherwise B (B's LSB is lost).
// The table follows the original TFxP MAC description; C's shift is 25 - b_C.
//
// A range field of 3 (an overflowed or underflowed operand) has no defined
// significand scale; this design treats it as range 2.
//
// Purely combinational.
module tfxp_mode_sel
  import tfxp_pkg::*;
(
  input  range_e a_e,    // range of operand A
  input  range_e b_e,    // range of operand B
  input  range_e c_e,    // range of addend C
  input  logic   a_lsb,  // A0, bit 0 of A's significand
  output a_sel_e a_sel,
  output b_sel_e b_sel,
  output c_sel_e c_sel
);

  range_e a_r, b_r, c_r;

  always_comb begin
    a_r = (a_e == RANGE_OV) ? RANGE2 : a_e;
    b_r = (b_e == RANGE_OV) ? RANGE2 : b_e;
    c_r = (c_e == RANGE_OV) ? RANGE2 : c_e;

    unique case ({a_r, b_r})
      {RANGE0, RANGE0}: begin
        a_sel = a_lsb ? A_PASS : A_SR1;
        b_sel = a_lsb ? B_SR1  : B_PASS;
      end
      {RANGE0, RANGE1}: begin a_sel = A_SL3;  b_sel = B_PASS; end
      {RANGE0, RANGE2}: begin a_sel = A_SL3;  b_sel = B_SL4;  end
      {RANGE1, RANGE0}: begin a_sel = A_SL3;  b_sel = B_PASS; end
      {RANGE1, RANGE1}: begin a_sel = A_SL3;  b_sel = B_SL4;  end
      {RANGE1, RANGE2}: begin a_sel = A_SL11; b_sel = B_PASS; end
      {RANGE2, RANGE0}: begin a_sel = A_SL3;  b_sel = B_SL4;  end
      {RANGE2, RANGE1}: begin a_sel = A_SL11; b_sel = B_PASS; end
      default:          begin a_sel = A_SL11; b_sel = B_SL4;  end  // {2, 2}
    endcase

    unique case (c_r)
      RANGE0:  c_sel = C_SL12;
      RANGE1:  c_sel = C_SL16;
      default: c_sel = C_SL20;
    endcase
  end

endmodule
