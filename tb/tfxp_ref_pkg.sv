// tfxp_ref_pkg: reference model of TFxP 16_13_9_5 arithmetic for the
// testbenches.
//
// It works on plain integers: a value is counted in units of 2^-25, the
// radix of the MAC accumulator. Operands are scaled by multiplying with
// powers of two, right shifts are floor divisions, and the result range is
// found by comparing the value against each range's bounds rather than by
// looking at bit fields, so it shares no structure with the RTL.
package tfxp_ref_pkg;

  // Fractional bits of a range code; code 3 is scaled like range 2.
  function automatic int frac_of(input logic [1:0] e);
    case (e)
      2'd0:    return 13;
      2'd1:    return 9;
      default: return 5;
    endcase
  endfunction

  function automatic longint sig_of(input logic [15:0] w);
    return longint'($signed(w[13:0]));
  endfunction

  function automatic longint pow2(input int n);
    return longint'(1) << n;
  endfunction

  // Floor division by 2^n for n >= 0.
  function automatic longint floor_div(input longint v, input int n);
    longint d, q;
    d = pow2(n);
    q = v / d;                       // truncates towards zero
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  // Product of two TFxP words in units of 2^-25, including the one-bit loss
  // when both are in range 0 and A is odd (B is halved first).
  function automatic longint ref_product(input logic [15:0] a, input logic [15:0] b);
    int     fa, fb;
    longint xa, xb;
    fa = frac_of(a[15:14]);
    fb = frac_of(b[15:14]);
    xa = sig_of(a);
    xb = sig_of(b);
    if (fa + fb == 26) begin
      if (xa % 2 == 0) return (xa / 2) * xb;
      else             return xa * floor_div(xb, 1);
    end
    return xa * xb * pow2(25 - fa - fb);
  endfunction

  // Addend in units of 2^-25.
  function automatic longint ref_addend(input logic [15:0] c);
    return sig_of(c) * pow2(25 - frac_of(c[15:14]));
  endfunction

  // Range a value in units of 2^-25 is packed into: 0, 1, 2, or 3 if none.
  function automatic int ref_range(input longint v);
    longint s;
    for (int r = 0; r < 3; r++) begin
      s = floor_div(v, 25 - frac_of(2'(r)));
      if (s >= -8192 && s <= 8191) return r;
    end
    return 3;
  endfunction

  // 16-bit TFxP word for a value in units of 2^-25.
  function automatic logic [15:0] ref_pack(input longint v);
    int     r;
    longint s;
    r = ref_range(v);
    if (r == 3) return (v > 0) ? 16'hDFFF : 16'hE000;
    s = floor_div(v, 25 - frac_of(2'(r)));
    return {2'(r), 14'(s)};
  endfunction

  // Random TFxP word in the given range (0..2) with a random significand.
  function automatic logic [15:0] rand_word(input int r);
    logic [13:0] x;
    x = 14'($urandom);
    return {2'(r), x};
  endfunction

endpackage
