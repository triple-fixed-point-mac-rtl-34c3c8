// tfxp_preshift: input multiplexers of the TFxP MAC unit.
//
// Three multiplexers place the 14-bit signed significands on the DSP slice
// inputs with the shift chosen by tfxp_mode_sel:
//   A (25 bits):  A, A>>1, A<<3, A<<11
//   B (18 bits):  B, B>>1, B<<4
//   C (48 bits):  C<<12, C<<16, C<<20
// The shift choices follow the original TFxP MAC description. Right shifts are arithmetic and
// truncate (the dropped bit is lost); every value is sign-extended to the
// width of its port, so no left shift can overflow a port.
//
// Purely combinational.
module tfxp_preshift
  import tfxp_pkg::*;
(
  input  sig_t                        a_x,
  input  sig_t                        b_x,
  input  sig_t                        c_x,
  input  a_sel_e                      a_sel,
  input  b_sel_e                      b_sel,
  input  c_sel_e                      c_sel,
  output logic signed [MUL_A_W-1:0]   a_mul,
  output logic signed [MUL_B_W-1:0]   b_mul,
  output acc_t                        c_add
);

  logic signed [MUL_A_W-1:0] a_ext;
  logic signed [MUL_B_W-1:0] b_ext;
  acc_t                      c_ext;

  always_comb begin
    a_ext = MUL_A_W'(a_x);   // sign-extending casts of signed operands
    b_ext = MUL_B_W'(b_x);
    c_ext = ACC_W'(c_x);

    unique case (a_sel)
      A_PASS: a_mul = a_ext;
      A_SR1:  a_mul = a_ext >>> 1;
      A_SL3:  a_mul = a_ext <<< 3;
      default: a_mul = a_ext <<< 11;
    endcase

    unique case (b_sel)
      B_SR1:   b_mul = b_ext >>> 1;
      B_SL4:   b_mul = b_ext <<< 4;
      default: b_mul = b_ext;
    endcase

    unique case (c_sel)
      C_SL12:  c_add = c_ext <<< 12;
      C_SL16:  c_add = c_ext <<< 16;
      default: c_add = c_ext <<< 20;
    endcase
  end

endmodule
