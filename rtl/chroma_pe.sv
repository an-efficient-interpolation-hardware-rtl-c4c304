// Chroma processing element with shared operation.
//
// One PE computes one 4-tap chroma filter sum on p[0..3], of type
//   A: -2 58 10 -2    B: -4 54 16 -2    C: -6 46 28 -4    D: -4 36 36 -4
// The eighth-pel sets 5/8, 6/8 and 7/8 are C, B and A on reversed taps; the
// caller reverses them. Two sums are shared by all four types,
// n03 = -(p0+p3) and s12 = p1+p2, and each type adds its own shifted terms:
//   A = 2*n03 +  8*s12 + 2*s12 + 32*p1 + 16*p1
//   B = 2*n03 + 16*s12 + 32*p1 + 4*p1 + 2*(p1-p0)
//   C = 4*n03 + 32*s12 + 8*p1 + 4*(p1-p2) + 2*(p1-p0)
//   D = 4*n03 + 32*s12 + 4*s12
// A output multiplexer selects the requested type. The PE is combinational:
// the chroma interpolator registers its outputs, one pass per clock.
//
// The shared terms and per-type shifts follow the published chroma PE, with
// the terms of types A and B set so that they match the standard coefficients.
module chroma_pe
  import interp_pkg::*;
#(
  parameter int IN_W  = INTER_W,
  parameter int OUT_W = INTER_W + 8
) (
  input  logic signed [IN_W-1:0]  p [4],
  input  chroma_type_e            kind,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] x [4];
  logic signed [OUT_W-1:0] n03, s12, d10, d12, y_a, y_b, y_c, y_d;

  always_comb begin
    for (int k = 0; k < 4; k++) x[k] = OUT_W'(p[k]);
    // shared operation
    n03 = -x[0] - x[3];
    s12 = x[1] + x[2];
    d10 = x[1] - x[0];
    d12 = x[1] - x[2];
    // type-specific completion
    y_a = ((n03 <<< 1) + (s12 <<< 3)) + ((s12 <<< 1) + (x[1] <<< 5) + (x[1] <<< 4));
    y_b = ((n03 <<< 1) + (s12 <<< 4)) + ((x[1] <<< 5) + (x[1] <<< 2) + (d10 <<< 1));
    y_c = ((n03 <<< 2) + (s12 <<< 5)) + ((x[1] <<< 3) + (d12 <<< 2) + (d10 <<< 1));
    y_d = ((n03 <<< 2) + (s12 <<< 5)) + (s12 <<< 2);
    unique case (kind)
      CHROMA_A: y = y_a;
      CHROMA_B: y = y_b;
      CHROMA_C: y = y_c;
      default:  y = y_d;
    endcase
  end

endmodule
