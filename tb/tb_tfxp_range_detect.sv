// tb_tfxp_range_detect: checks range selection and over/underflow flags.
//
// Accumulator values are drawn around every range boundary (+-2^25, +-2^29,
// +-2^33 in units of 2^-25, one either side) and at random magnitudes of
// every size; the expected range comes from comparing the value with each
// range's bounds in the reference model.
module tb_tfxp_range_detect;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  acc_t   p;
  range_e range;
  logic   ovf, unf;
  int     checks = 0, failures = 0;
  int     seen[4];

  tfxp_range_detect dut (.*);

  task automatic try(input longint v);
    int r;
    p = acc_t'(v);
    #1;
    r = ref_range(v);
    seen[r]++;
    checks += 3;
    if (int'(range) != r) begin failures++; $display("FAIL range v=%0d got %0d exp %0d", v, range, r); end
    if (ovf != (r == 3 && v > 0)) begin failures++; $display("FAIL ovf v=%0d", v); end
    if (unf != (r == 3 && v < 0)) begin failures++; $display("FAIL unf v=%0d", v); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    try(0);
    for (int e = 25; e <= 33; e += 4)
      for (int d = -1; d <= 1; d++) begin
        try(pow2(e) + longint'(d));
        try(-pow2(e) + longint'(d));
      end
    try(pow2(46)); try(-pow2(47)); try(pow2(47) - 1);
    for (int n = 0; n < 2000; n++) begin
      longint v;
      int     sh;
      sh = $urandom_range(46, 0);
      v  = longint'({$urandom, $urandom}) % pow2(sh + 1);
      try(v);
    end
    for (int r = 0; r < 4; r++)
      if (seen[r] == 0) begin failures++; $display("FAIL range %0d never produced", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
