// tb_dsp_slice: checks the multiply-accumulate slice and its pipeline timing.
//
// Random 25-bit and 18-bit operands are issued with random idle cycles in
// between; for each operation use_c and c follow one cycle after a and b, as
// the slice expects. A reference accumulator computes P = A*B + C or
// P = A*B + P, and every result must appear with out_valid exactly three
// clock edges after its operands were sampled. Idle cycles must leave P
// unchanged.
module tb_dsp_slice;
  logic               clk = 0, rst = 1, in_valid = 0, use_c = 0, out_valid;
  logic signed [24:0] a = '0;
  logic signed [17:0] b = '0;
  logic signed [47:0] c = '0, p;
  int checks = 0, failures = 0;
  int cycle = 0;

  longint exp_q[$];
  int     due_q[$];
  longint ref_p = 0;
  logic   pend_use_c;
  longint pend_c, pend_prod;
  bit     pend = 0;
  int     n_load = 0, n_acc = 0, n_idle = 0;

  dsp_slice dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (out_valid) begin
        checks += 2;
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
        else begin
          longint e; int due;
          e = exp_q.pop_front(); due = due_q.pop_front();
          if (longint'(p) != e) begin failures++; $display("FAIL p=%0d exp %0d", p, e); end
          if (cycle != due) begin failures++; $display("FAIL latency: at %0d, due %0d", cycle, due); end
        end
      end else if (exp_q.size() == 0) begin
        checks++;
        if (longint'(p) != ref_p) begin failures++; $display("FAIL P changed while idle"); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // second half of the previous operation: c and use_c one cycle late
      if (pend) begin
        c     = 48'(pend_c);
        use_c = pend_use_c;
        ref_p = (pend_use_c ? pend_c : ref_p) + pend_prod;
        exp_q.push_back(ref_p);
        due_q.push_back(cycle + 2);
        pend = 0;
      end else begin
        c = 48'($urandom); use_c = 1'($urandom);   // ignored values
      end
      if ($urandom_range(3, 0) == 0) begin
        in_valid = 0; n_idle++;
        a = 25'($urandom); b = 18'($urandom);
      end else begin
        in_valid = 1;
        a = 25'($urandom); b = 18'($urandom);
        if (n % 7 == 0) begin a = 25'h1000000; b = 18'h20000; end   // most negative both
        pend_prod  = longint'(a) * longint'(b);
        pend_use_c = ($urandom_range(4, 0) == 0) || (n < 2);
        pend_c     = longint'($signed(48'({$urandom, $urandom}))) >>> 4;
        if (pend_use_c) n_load++; else n_acc++;
        pend = 1;
      end
    end
    @(negedge clk);
    if (pend) begin
      c = 48'(pend_c); use_c = pend_use_c;
      ref_p = (pend_use_c ? pend_c : ref_p) + pend_prod;
      exp_q.push_back(ref_p); due_q.push_back(cycle + 2);
      pend = 0;
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_load == 0 || n_acc == 0 || n_idle == 0) begin
      failures++; $display("FAIL left=%0d load=%0d acc=%0d idle=%0d", exp_q.size(), n_load, n_acc, n_idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
