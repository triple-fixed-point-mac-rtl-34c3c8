// tb_tfxp_mode_sel: exhaustive check of the TFxP range decoder.
//
// For every combination of the three range fields (codes 0..3) and both
// values of A's LSB it decodes the selects into shift amounts and checks
// that A's and B's fractional bits plus their shifts sum to exactly 25, that
// C's fraction plus its shift is 25, that the shifted operands fit the 25-
// and 18-bit multiplier ports, and that when both operands are in range 0
// the right shift goes to A if A0 = 0 and to B if A0 = 1.
module tb_tfxp_mode_sel;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  range_e a_e, b_e, c_e;
  logic   a_lsb;
  a_sel_e a_sel;
  b_sel_e b_sel;
  c_sel_e c_sel;
  int     checks = 0, failures = 0;

  tfxp_mode_sel dut (.*);

  function automatic int a_shift(input a_sel_e s);
    case (s)
      A_PASS:  return 0;
      A_SR1:   return -1;
      A_SL3:   return 3;
      default: return 11;
    endcase
  endfunction

  function automatic int b_shift(input b_sel_e s);
    case (s)
      B_PASS:  return 0;
      B_SR1:   return -1;
      B_SL4:   return 4;
      default: return 99;  // illegal select
    endcase
  endfunction

  function automatic int c_shift(input c_sel_e s);
    case (s)
      C_SL12:  return 12;
      C_SL16:  return 16;
      C_SL20:  return 20;
      default: return 99;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a_e=%0d b_e=%0d c_e=%0d a0=%0d a_sel=%0d b_sel=%0d c_sel=%0d",
               what, a_e, b_e, c_e, a_lsb, a_sel, b_sel, c_sel);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ae = 0; ae < 4; ae++)
      for (int be = 0; be < 4; be++)
        for (int ce = 0; ce < 4; ce++)
          for (int l = 0; l < 2; l++) begin
            int fa, fb, fc, sa, sb, sc;
            a_e = range_e'(ae); b_e = range_e'(be); c_e = range_e'(ce); a_lsb = 1'(l);
            #1;
            fa = frac_of(2'(ae)); fb = frac_of(2'(be)); fc = frac_of(2'(ce));
            sa = a_shift(a_sel); sb = b_shift(b_sel); sc = c_shift(c_sel);
            check(fa + sa + fb + sb == 25, "product radix is not 25");
            check(fc + sc == 25, "addend radix is not 25");
            check(14 + sa <= 25 && 14 + sb <= 18, "shift exceeds port width");
            if (fa == 13 && fb == 13) begin
              check(l == 0 ? (sa == -1 && sb == 0) : (sa == 0 && sb == -1),
                    "range-0 by range-0 right shift on wrong operand");
            end else begin
              check(sa >= 0 && sb >= 0, "right shift outside the range-0 case");
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
