// tb_tfxp_mac: end-to-end test of the TFxP MAC unit at its only (full) size.
//
// A random stream of operations is issued: sums are started with use_c = 1
// and a TFxP bias, continued with use_c = 0, and separated by idle cycles.
// Operands come from all three ranges, with occasional range-3 words and
// long sums of large products that drive the result past range 2 in both
// directions. An integer reference model gives the exact accumulator value
// (units of 2^-25, including the one-bit loss of the range-0 by range-0
// case) and the packed 16-bit word; both must appear with out_valid exactly
// three clock edges after the operands were sampled.
//
// Every mechanism of the design is counted and must occur at least once:
// the nine operand range pairs, the three addend ranges, the A-side and
// B-side right shift, a lossy B shift, bias loads, accumulation, idle
// cycles, results in each range, overflow, underflow and range-3 inputs.
module tb_tfxp_mac;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  logic        clk = 0, rst = 1, in_valid = 0, use_c = 0;
  logic [15:0] a = '0, b = '0, c = '0;
  logic        out_valid, ovf, unf;
  logic [15:0] p;
  acc_t        p_acc;

  int checks = 0, failures = 0;
  int cycle = 0;

  longint      exp_acc_q[$];
  logic [15:0] exp_w_q[$];
  int          due_q[$];
  longint      ref_acc = 0;

  int pair_cnt[3][3];
  int cr_cnt[3];
  int out_cnt[4];
  int n_sr_a = 0, n_sr_b = 0, n_lossy = 0, n_load = 0, n_acc = 0, n_idle = 0;
  int n_ovf = 0, n_unf = 0, n_e3 = 0;

  localparam int N_OPS = 20000;

  tfxp_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && out_valid) begin
      checks += 3;
      if (exp_acc_q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
      else begin
        longint e; logic [15:0] w; int due;
        e = exp_acc_q.pop_front(); w = exp_w_q.pop_front(); due = due_q.pop_front();
        if (longint'(p_acc) != e) begin failures++; $display("FAIL acc %0d exp %0d", p_acc, e); end
        if (p !== w) begin failures++; $display("FAIL word %h exp %h (acc %0d)", p, w, e); end
        if (cycle != due) begin failures++; $display("FAIL latency at %0d due %0d", cycle, due); end
        out_cnt[ref_range(e)]++;
        if (ovf) n_ovf++;
        if (unf) n_unf++;
      end
    end
  end

  // Range of an operand: mostly uniform, sometimes the reserved code 3.
  function automatic int pick_range();
    int r;
    r = $urandom_range(99, 0);
    if (r < 2) return 3;
    return r % 3;
  endfunction

  initial begin
    foreach (pair_cnt[i, j]) pair_cnt[i][j] = 0;
    foreach (cr_cnt[i]) cr_cnt[i] = 0;
    foreach (out_cnt[i]) out_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < N_OPS; n++) begin
      @(negedge clk);
      if ($urandom_range(5, 0) == 0) begin
        in_valid = 0; n_idle++;
        a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); use_c = 1'($urandom);
      end else begin
        int ra, rb, rc;
        bit big_run;
        longint prod;
        in_valid = 1;
        // every 500 operations: a run of large same-sign products
        big_run = (n % 500) >= 480;
        ra = big_run ? 2 : pick_range();
        rb = big_run ? 2 : pick_range();
        rc = pick_range();
        a = rand_word(ra); b = rand_word(rb); c = rand_word(rc);
        if (ra == 3) a[15:14] = 2'd3;
        if (rb == 3) b[15:14] = 2'd3;
        if (rc == 3) c[15:14] = 2'd3;
        if (big_run) begin
          a[13:12] = 2'b01;                          // large positive A
          b[13:12] = (((n / 500) % 2) != 0) ? 2'b01 : 2'b10; // B sign alternates per run
        end
        if (ra == 3 || rb == 3 || rc == 3) n_e3++;
        // start a new sum now and then, or when the next term could wrap
        use_c = (n < 2) || ($urandom_range(7, 0) == 0) ||
                ((ref_range(ref_acc) == 3) && ($urandom_range(1, 0) == 0)) ||
                (ref_acc > pow2(44)) || (ref_acc < -pow2(44));
        if (big_run && (n % 500) != 480) use_c = 0;
        prod = ref_product(a, b);
        if (use_c) begin ref_acc = ref_addend(c) + prod; n_load++; cr_cnt[(rc > 2) ? 2 : rc]++; end
        else begin ref_acc = ref_acc + prod; n_acc++; end
        pair_cnt[(ra > 2) ? 2 : ra][(rb > 2) ? 2 : rb]++;
        if (frac_of(a[15:14]) + frac_of(b[15:14]) == 26) begin
          if (a[0] == 1'b0) n_sr_a++;
          else begin n_sr_b++; if (b[0]) n_lossy++; end
        end
        exp_acc_q.push_back(ref_acc);
        exp_w_q.push_back(ref_pack(ref_acc));
        due_q.push_back(cycle + 3);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);

    checks++;
    if (exp_acc_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_acc_q.size()); end
    foreach (pair_cnt[i, j]) begin
      checks++;
      if (pair_cnt[i][j] == 0) begin failures++; $display("FAIL range pair %0d,%0d never", i, j); end
    end
    foreach (cr_cnt[i]) begin
      checks++;
      if (cr_cnt[i] == 0) begin failures++; $display("FAIL addend range %0d never", i); end
    end
    foreach (out_cnt[i]) begin
      checks++;
      if (out_cnt[i] == 0) begin failures++; $display("FAIL result range %0d never", i); end
    end
    checks += 9;
    if (n_sr_a == 0)  begin failures++; $display("FAIL A right shift never"); end
    if (n_sr_b == 0)  begin failures++; $display("FAIL B right shift never"); end
    if (n_lossy == 0) begin failures++; $display("FAIL lossy B shift never"); end
    if (n_load == 0)  begin failures++; $display("FAIL bias load never"); end
    if (n_acc == 0)   begin failures++; $display("FAIL accumulate never"); end
    if (n_idle == 0)  begin failures++; $display("FAIL idle cycle never"); end
    if (n_ovf == 0)   begin failures++; $display("FAIL overflow never"); end
    if (n_unf == 0)   begin failures++; $display("FAIL underflow never"); end
    if (n_e3 == 0)    begin failures++; $display("FAIL range-3 input never"); end
    $display("counts: load=%0d acc=%0d idle=%0d srA=%0d srB=%0d lossy=%0d ovf=%0d unf=%0d e3=%0d out=%0d/%0d/%0d/%0d",
             n_load, n_acc, n_idle, n_sr_a, n_sr_b, n_lossy, n_ovf, n_unf, n_e3,
             out_cnt[0], out_cnt[1], out_cnt[2], out_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
