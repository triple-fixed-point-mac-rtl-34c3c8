// dsp_slice: the subset of a Xilinx DSP48E1 slice that the TFxP MAC uses,
// written as plain synthesizable logic (on a 7-series device it maps onto a
// single DSP48E1 with AREG = BREG = CREG = MREG = PREG = OPMODEREG = 1).
//
// Datapath, one register per stage:
//   a, b  -> A/B registers -> signed 25x18 multiply -> M register --+
//   c     -> C register -----------------------------------------+--> add -> P register
//   use_c -> OPMODE register: 1 selects P = M + C, 0 selects P = M + P
// The product reaches the adder two clock edges after a and b are sampled,
// c and use_c one edge after they are sampled; a caller that wants them to
// belong to the same operation presents c and use_c one cycle later (the
// TFxP MAC puts one register in front of them for that).
//
// in_valid travels with a and b. The P register changes only when a valid
// product reaches the adder, so idle cycles do not disturb the accumulator;
// out_valid is high while P holds a freshly computed value (latency 3 clock
// edges from sampling a and b).
// rst is synchronous and active high, like the DSP48E1 resets, and clears
// every register. The module's interface, valid tracking and reset are this
// design's own; the original TFxP MAC
// description gives only the slice's role and port widths.
module dsp_slice #(
  parameter int unsigned A_W = 25,  // multiplier input A width
  parameter int unsigned B_W = 18,  // multiplier input B width
  parameter int unsigned P_W = 48   // C input, adder and P width
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  input  logic signed [P_W-1:0] c,
  input  logic                  use_c,
  output logic signed [P_W-1:0] p,
  output logic                  out_valid
);

  logic signed [A_W-1:0]     a_q;
  logic signed [B_W-1:0]     b_q;
  logic signed [A_W+B_W-1:0] m_q;
  logic signed [P_W-1:0]     c_q;
  logic                      use_c_q;
  logic                      v_a, v_m;
  logic signed [P_W-1:0]     m_ext, addend;

  always_comb begin
    m_ext  = P_W'(m_q);
    addend = use_c_q ? c_q : p;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q       <= '0;
      b_q       <= '0;
      m_q       <= '0;
      c_q       <= '0;
      use_c_q   <= 1'b0;
      v_a       <= 1'b0;
      v_m       <= 1'b0;
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      a_q       <= a;
      b_q       <= b;
      v_a       <= in_valid;
      m_q       <= a_q * b_q;
      v_m       <= v_a;
      c_q       <= c;
      use_c_q   <= use_c;
      if (v_m) p <= m_ext + addend;
      out_valid <= v_m;
    end
  end

  // Every valid operation produces exactly one result, three edges later.
  a_latency: assert property (@(posedge clk) disable iff (rst)
                              in_valid |-> ##3 out_valid);

endmodule
