// Luma processing element with shared operation.
//
// One PE computes one luma filter sum per clock, either the 7-tap quarter-pel
// set A (-1 4 -10 58 17 -5 1 on p[0..6]) or the 8-tap half-pel set B
// (-1 4 -11 40 40 -11 4 -1 on p[0..7]). The three-quarter set is A on reversed
// taps; the caller reverses them. There are no multipliers: the sums are built
// from shifts and adds, and the part common to A and B is computed once:
//
//   SOP = -p0 + 4*p1 + 16*(p3+p4) - 10*(p2+p5)
//   A   = SOP + (32+8+2)*p3 + (4*p5 + p5 + p4 + p6)
//   B   = SOP + 24*(p3+p4) - (p2+p5) + 4*p6 - p7
//
// The shared term and the A-branch partial sums follow the published
// shared-operation PE. Its B branch is printed as SOP + 32*(p3+p4) + ..., which
// gives 48 for the centre taps instead of the standard 40; this design adds
// 16*(p3+p4) + 8*(p3+p4) so that B matches the standard half-pel filter.
//
// Timing: the first adder levels end in a register stage (enabled by en), the
// final adds and the A/B select are combinational after it, so y belongs to
// the inputs of the previous enabled clock. p is signed so the PE can filter
// both 8-bit reference samples (zero-extended) and signed first-stage samples.
module luma_pe
  import interp_pkg::*;
#(
  parameter int IN_W  = INTER_W,
  parameter int OUT_W = INTER_W + 8
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  p [8],
  input  luma_type_e              kind,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] x [8];
  always_comb
    for (int k = 0; k < 8; k++) x[k] = OUT_W'(p[k]);

  // First stage: shared operation and the type-specific partial sums.
  logic signed [OUT_W-1:0] s34, n25, sop, a_p3, a_rest, b_rest;
  always_comb begin
    s34    = x[3] + x[4];
    n25    = -x[2] - x[5];
    sop    = ((x[1] <<< 2) - x[0]) + (s34 <<< 4) + ((n25 <<< 3) + (n25 <<< 1));
    a_p3   = ((x[3] <<< 5) + (x[3] <<< 3)) + (x[3] <<< 1);
    a_rest = ((x[5] <<< 2) + x[5]) + (x[4] + x[6]);
    b_rest = ((s34 <<< 4) + (s34 <<< 3) + n25) + ((x[6] <<< 2) - x[7]);
  end

  logic signed [OUT_W-1:0] sop_q, a_p3_q, a_rest_q, b_rest_q;
  luma_type_e              kind_q;
  always_ff @(posedge clk)
    if (en) begin
      sop_q    <= sop;
      a_p3_q   <= a_p3;
      a_rest_q <= a_rest;
      b_rest_q <= b_rest;
      kind_q   <= kind;
    end

  // Second stage: finish both sums and select.
  logic signed [OUT_W-1:0] y_a, y_b;
  always_comb begin
    y_a = (sop_q + a_p3_q) + a_rest_q;
    y_b = sop_q + b_rest_q;
    y   = (kind_q == LUMA_B) ? y_b : y_a;
  end

endmodule
