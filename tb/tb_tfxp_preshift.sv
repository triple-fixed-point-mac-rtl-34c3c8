// tb_tfxp_preshift: random check of the three input shift multiplexers.
//
// Random 14-bit significands are driven with every select value; the
// expected port values are computed by integer multiplication with a power
// of two, or floor division by two for the right shifts, and compared with
// the sign-extended outputs.
module tb_tfxp_preshift;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  sig_t   a_x, b_x, c_x;
  a_sel_e a_sel;
  b_sel_e b_sel;
  c_sel_e c_sel;
  logic signed [MUL_A_W-1:0] a_mul;
  logic signed [MUL_B_W-1:0] b_mul;
  acc_t   c_add;
  int     checks = 0, failures = 0;

  tfxp_preshift dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a_x = sig_t'($urandom); b_x = sig_t'($urandom); c_x = sig_t'($urandom);
      if (n == 0) begin a_x = 14'h2000; b_x = 14'h2000; c_x = 14'h2000; end   // most negative
      if (n == 1) begin a_x = 14'h1FFF; b_x = 14'h1FFF; c_x = 14'h1FFF; end   // most positive
      if (n == 2) begin a_x = -14'sd1; b_x = -14'sd1; c_x = -14'sd1; end
      for (int s = 0; s < 4; s++) begin
        longint ea, eb, ec, xa, xb, xc;
        a_sel = a_sel_e'(s);
        b_sel = b_sel_e'(s % 3);
        c_sel = c_sel_e'(s % 3);
        #1;
        xa = longint'(a_x); xb = longint'(b_x); xc = longint'(c_x);
        case (s)
          0: ea = xa;
          1: ea = floor_div(xa, 1);
          2: ea = xa * 8;
          default: ea = xa * 2048;
        endcase
        case (s % 3)
          0: eb = xb;
          1: eb = floor_div(xb, 1);
          default: eb = xb * 16;
        endcase
        case (s % 3)
          0: ec = xc * pow2(12);
          1: ec = xc * pow2(16);
          default: ec = xc * pow2(20);
        endcase
        checks += 3;
        if (longint'(a_mul) != ea) begin failures++; $display("FAIL A sel=%0d x=%0d got %0d exp %0d", s, xa, a_mul, ea); end
        if (longint'(b_mul) != eb) begin failures++; $display("FAIL B sel=%0d x=%0d got %0d exp %0d", s % 3, xb, b_mul, eb); end
        if (longint'(c_add) != ec) begin failures++; $display("FAIL C sel=%0d x=%0d got %0d exp %0d", s % 3, xc, c_add, ec); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
