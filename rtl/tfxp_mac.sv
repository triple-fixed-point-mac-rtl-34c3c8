// tfxp_mac: Triple Fixed-Point (TFxP 16_13_9_5) multiply-accumulate unit.
//
// Each operand is a 16-bit word {E[1:0], X[13:0]} worth X * 2^-b_E with
// b = 13, 9, 5 for E = 0, 1, 2. Products of such numbers have one of five
// radix positions, and summing them would need an alignment shifter in the
// accumulator loop. Instead, the unit shifts the operands before they enter
// the multiplier so that every product has exactly 25 fractional bits; the
// accumulator then adds like a plain integer adder at full DSP speed.
//
//   a, b, c --> tfxp_mode_sel (shift selects from the range fields)
//           --> tfxp_preshift (A: x1, >>1, <<3, <<11; B: x1, >>1, <<4;
//                              C: <<12, <<16, <<20)
//           --> dsp_slice     (P = A*B + C  when use_c = 1,
//                              P = A*B + P  when use_c = 0)
//           --> tfxp_range_detect + tfxp_out_mux (16-bit TFxP result)
//
// When both operands are in range 0 the needed fraction is 26 bits, one more
// than the ports allow; one operand is then shifted right by one: A when its
// LSB is 0 (no loss), else B (its LSB is dropped).
//
// Interface and timing: a, b, c, use_c and in_valid are sampled together on
// a rising clock edge. The C significand and use_c pass one register here
// before entering the slice, which lines them up with the product (two
// register stages in the slice). The accumulator p_acc and the result word
// p, ovf and unf belong to the operation sampled three edges earlier and are
// valid while out_valid is high; they hold their value between valid
// operations. To start a new sum, apply use_c = 1 with C = 0 (or a bias);
// to keep summing, use_c = 0 (C is then ignored). rst is synchronous and
// active high.
//
// The shift scheme, multiplexers, DSP-slice datapath and output field
// checks follow the original TFxP MAC description. Valid tracking, the reset, the overflow and
// underflow word values, truncation of dropped bits and the treatment of
// E = 3 inputs as range 2 are this design's own choices.
module tfxp_mac
  import tfxp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,  // a, b, c, use_c carry an operation
  input  logic [WORD_W-1:0] a,         // TFxP multiplicand
  input  logic [WORD_W-1:0] b,         // TFxP multiplier
  input  logic [WORD_W-1:0] c,         // TFxP addend, used when use_c = 1
  input  logic              use_c,     // 1: P = A*B + C, 0: P = A*B + P
  output logic              out_valid,
  output logic [WORD_W-1:0] p,         // TFxP result of the accumulator
  output logic              ovf,       // accumulator above range 2
  output logic              unf,       // accumulator below range 2
  output acc_t              p_acc      // raw accumulator, 25 fractional bits
);

  tfxp_t  a_w, b_w, c_w;
  a_sel_e a_sel;
  b_sel_e b_sel;
  c_sel_e c_sel;

  logic signed [MUL_A_W-1:0] a_mul;
  logic signed [MUL_B_W-1:0] b_mul;
  acc_t                      c_add, c_add_q;
  logic                      use_c_q;
  range_e                    out_range;

  assign a_w = tfxp_t'(a);
  assign b_w = tfxp_t'(b);
  assign c_w = tfxp_t'(c);

  tfxp_mode_sel u_mode (
    .a_e   (a_w.e),
    .b_e   (b_w.e),
    .c_e   (c_w.e),
    .a_lsb (a_w.x[0]),
    .a_sel (a_sel),
    .b_sel (b_sel),
    .c_sel (c_sel)
  );

  tfxp_preshift u_preshift (
    .a_x   (a_w.x),
    .b_x   (b_w.x),
    .c_x   (c_w.x),
    .a_sel (a_sel),
    .b_sel (b_sel),
    .c_sel (c_sel),
    .a_mul (a_mul),
    .b_mul (b_mul),
    .c_add (c_add)
  );

  // Register in front of the slice's C and OPMODE inputs (see header).
  always_ff @(posedge clk) begin
    if (rst) begin
      c_add_q <= '0;
      use_c_q <= 1'b0;
    end else begin
      c_add_q <= c_add;
      use_c_q <= use_c;
    end
  end

  dsp_slice #(
    .A_W (MUL_A_W),
    .B_W (MUL_B_W),
    .P_W (ACC_W)
  ) u_dsp (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .a         (a_mul),
    .b         (b_mul),
    .c         (c_add_q),
    .use_c     (use_c_q),
    .p         (p_acc),
    .out_valid (out_valid)
  );

  tfxp_range_detect u_detect (
    .p     (p_acc),
    .range (out_range),
    .ovf   (ovf),
    .unf   (unf)
  );

  tfxp_out_mux u_out (
    .p     (p_acc),
    .range (out_range),
    .ovf   (ovf),
    .unf   (unf),
    .word  (p)
  );

endmodule
