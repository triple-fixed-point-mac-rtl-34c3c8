// tfxp_out_mux: output multiplexer of the TFxP MAC unit.
//
// Builds the 16-bit TFxP result {E, X} from the 48-bit accumulator (25
// fractional bits) and the decision of tfxp_range_detect. Its five inputs
// are the three range words and the two error codes:
//   MODE0 = {2'b00, P[25:12]}   13 fractional bits
//   MODE1 = {2'b01, P[29:16]}    9 fractional bits
//   MODE2 = {2'b10, P[33:20]}    5 fractional bits
//   OFLW  = 16'hDFFF            range code 3, S = 0
//   UFLW  = 16'hE000            range code 3, S = 1
// Dropping the low accumulator bits truncates towards minus infinity. The
// mux inputs and the range code 3 follow the original TFxP MAC description; the low 13 bits of
// the two error words and the truncation are this design's choice.
//
// Purely combinational.
module tfxp_out_mux
  import tfxp_pkg::*;
(
  input  acc_t              p,
  input  range_e            range,
  input  logic              ovf,
  input  logic              unf,
  output logic [WORD_W-1:0] word
);

  localparam int unsigned LSB0 = RADIX - FRAC0;  // 12
  localparam int unsigned LSB1 = RADIX - FRAC1;  // 16
  localparam int unsigned LSB2 = RADIX - FRAC2;  // 20

  always_comb begin
    unique case (range)
      RANGE0:  word = {RANGE0, p[LSB0 +: SIG_W]};
      RANGE1:  word = {RANGE1, p[LSB1 +: SIG_W]};
      RANGE2:  word = {RANGE2, p[LSB2 +: SIG_W]};
      default: word = ovf ? OFLW_WORD : UFLW_WORD;
    endcase
  end

  // Exactly one error flag is raised whenever the range code is 3.
  always_comb begin
    if (range == RANGE_OV) assert (ovf ^ unf);
    else                   assert (!ovf && !unf);
  end

endmodule
