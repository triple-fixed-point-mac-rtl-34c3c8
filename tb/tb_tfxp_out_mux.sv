// tb_tfxp_out_mux: checks the 16-bit result word built from the accumulator.
//
// For each random accumulator value the testbench decides the range itself
// (reference model) and feeds that decision to the multiplexer, then checks
// the word against the reference packing: the range code followed by the
// floor of the value at that range's scale, or the overflow / underflow word.
module tb_tfxp_out_mux;
  import tfxp_pkg::*;
  import tfxp_ref_pkg::*;

  acc_t        p;
  range_e      range;
  logic        ovf, unf;
  logic [15:0] word;
  int          checks = 0, failures = 0;

  tfxp_out_mux dut (.*);

  task automatic try(input longint v);
    int r;
    logic [15:0] exp_w;
    r     = ref_range(v);
    p     = acc_t'(v);
    range = range_e'(r);
    ovf   = (r == 3) && (v > 0);
    unf   = (r == 3) && (v < 0);
    #1;
    exp_w = ref_pack(v);
    checks++;
    if (word !== exp_w) begin
      failures++;
      $display("FAIL v=%0d range=%0d got %h exp %h", v, r, word, exp_w);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0); try(-1); try(pow2(25) - 1); try(-pow2(25)); try(pow2(33)); try(-pow2(33) - 1);
    for (int n = 0; n < 2000; n++) begin
      longint v;
      int     sh;
      sh = $urandom_range(40, 0);
      v  = longint'({$urandom, $urandom}) % pow2(sh + 1);
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
