// tb_tfxp_conv3x3: convolution workload on the TFxP MAC unit.
//
// Computes output pixels of a 3x3 convolution over CH input channels,
// y = b + sum over (u, v, ch) of w[u][v][ch] * x[u][v][ch], one term per
// clock: the first term loads the bias through C (use_c = 1), the rest
// accumulate. Weights and activations are real numbers drawn like those of
// a detection CNN: mostly small, with rare large ones up to about 114 in
// magnitude, the largest activation seen in the network analysed for this
// format. They are converted to TFxP by picking the first range whose
// significand holds the rounded value.
//
// Each pixel is checked twice: bit-exactly against the integer reference
// model of the MAC, and against the real-valued sum within a bound made of
// the input rounding errors, the possible one-bit loss per range-0 product
// and the output LSB. It also checks that every one of the Table I extreme
// values converts to a range below 3 (no overflow).
module tb_tfxp_conv3x3;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  localparam int CH     = 32;          // input channels per window
  localparam int TERMS  = 9 * CH;
  localparam int PIXELS = 60;

  logic        clk = 0, rst = 1, in_valid = 0, use_c = 0;
  logic [15:0] a = '0, b = '0, c = '0;
  logic        out_valid, ovf, unf;
  logic [15:0] p;
  acc_t        p_acc;

  int checks = 0, failures = 0;
  int out_range_cnt[4];

  tfxp_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Real number to TFxP: first range whose significand holds round(v * 2^b).
  function automatic logic [15:0] to_tfxp(input real v);
    longint s;
    for (int r = 0; r < 3; r++) begin
      s = longint'($rtoi(v * real'(pow2(frac_of(2'(r)))) + (v >= 0 ? 0.5 : -0.5)));
      if (s >= -8192 && s <= 8191) return {2'(r), 14'(s)};
    end
    return (v > 0) ? 16'hDFFF : 16'hE000;
  endfunction

  function automatic real tfxp_val(input logic [15:0] w);
    return real'(sig_of(w)) / real'(pow2(frac_of(w[15:14])));
  endfunction

  function automatic real half_lsb(input logic [15:0] w);
    return 0.5 / real'(pow2(frac_of(w[15:14])));
  endfunction

  function automatic real abs_r(input real v);
    return (v < 0) ? -v : v;
  endfunction

  // Mostly small values with a heavy tail, bounded by +-lim.
  function automatic real draw(input real lim);
    real u, v;
    u = real'($urandom_range(1000000, 0)) / 1000000.0 * 2.0 - 1.0;
    case ($urandom_range(49, 0))
      0:       v = u * lim;          // rare large value
      1, 2, 3: v = u * 6.0;          // middle range
      default: v = u * 0.9;          // bulk of the values
    endcase
    return v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    static real extremes[8] = '{-18.6, 99.5, -113.9, 106.3, -57.9, 31.6, -23.1, 28.6};
    foreach (out_range_cnt[i]) out_range_cnt[i] = 0;
    foreach (extremes[i]) begin
      logic [15:0] w;
      w = to_tfxp(extremes[i]);
      check(w[15:14] != 2'd3 && abs_r(tfxp_val(w) - extremes[i]) <= 1.0 / 64.0,
            $sformatf("extreme %f converts to %h", extremes[i], w));
    end

    repeat (3) @(negedge clk);
    rst = 0;
    for (int px = 0; px < PIXELS; px++) begin
      real         exact, bound, bias;
      longint      ref_acc;
      logic [15:0] wq, xq, bq;
      bias = draw(4.0);
      bq   = to_tfxp(bias);
      exact = bias;
      bound = half_lsb(bq);
      ref_acc = 0;
      for (int t = 0; t < TERMS; t++) begin
        real w, x;
        w  = draw(99.5 / 4.0);
        x  = draw(113.9 / 4.0);
        wq = to_tfxp(w);
        xq = to_tfxp(x);
        exact += w * x;
        bound += abs_r(w) * half_lsb(xq) + abs_r(tfxp_val(xq)) * half_lsb(wq) + 1.0 / real'(pow2(25));
        if (frac_of(wq[15:14]) + frac_of(xq[15:14]) == 26) bound += abs_r(tfxp_val(wq)) / 8192.0;
        @(negedge clk);
        in_valid = 1;
        a = wq; b = xq; c = bq;
        use_c = (t == 0);
        ref_acc = (t == 0 ? ref_addend(bq) : ref_acc) + ref_product(wq, xq);
      end
      @(negedge clk);
      in_valid = 0;
      // the last term was sampled two edges ago; its result follows the next edge
      repeat (2) @(negedge clk);
      check(out_valid, $sformatf("pixel %0d: no result three edges after the last term", px));
      check(longint'(p_acc) == ref_acc, $sformatf("pixel %0d acc %0d exp %0d", px, p_acc, ref_acc));
      check(p == ref_pack(ref_acc), $sformatf("pixel %0d word %h exp %h", px, p, ref_pack(ref_acc)));
      out_range_cnt[p[15:14]]++;
      bound += 1.0 / real'(pow2(frac_of(p[15:14])));
      if (p[15:14] != 2'd3)
        check(abs_r(tfxp_val(p) - exact) <= bound,
              $sformatf("pixel %0d value %f real %f bound %f", px, tfxp_val(p), exact, bound));
    end
    check(out_range_cnt[1] + out_range_cnt[2] > 0, "no pixel left range 0");
    $display("pixels per output range: %0d %0d %0d %0d",
             out_range_cnt[0], out_range_cnt[1], out_range_cnt[2], out_range_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
