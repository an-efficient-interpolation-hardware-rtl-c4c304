// Shared types and helpers of the HEVC fractional-sample interpolator.
//
// The luma filter has three coefficient sets (Table "luma coefficients"):
//   A (quarter pel)      -1  4 -10 58 17  -5  1
//   B (half pel)         -1  4 -11 40 40 -11  4 -1
//   C (three-quarter)     1 -5  17 58 -10  4 -1   = A applied to reversed taps
// The chroma filter has seven (eighth pel), of which E, F and G are C, B and A
// applied to reversed taps, so a chroma PE only has to build A..D.
// The decode functions below turn a fractional position into the PE type and
// the tap order, which the filter arrays use to route samples to their PEs.
package interp_pkg;

  // Width of the first-stage (horizontal) samples that are fed back into the
  // filter for the second pass. For 8..10-bit video the HEVC first-stage
  // range (-6120..22440 at 8 bits) fits in 16 signed bits.
  localparam int INTER_W = 16;
  // Width of the predicted samples delivered to weighted prediction. The
  // two-stage result of an extreme synthetic input reaches 33150, so one bit
  // more than the intermediate is kept.
  localparam int PRED_W  = 17;
  // Second-stage normalisation shift of HEVC (shift2) and full-pel shift base.
  localparam int SHIFT2  = 6;
  localparam int PREC    = 14;

  // Luma PE coefficient set.
  typedef enum logic {
    LUMA_A = 1'b0,   // quarter-pel set, also the three-quarter set when reversed
    LUMA_B = 1'b1    // half-pel set
  } luma_type_e;

  // Chroma PE coefficient set.
  typedef enum logic [1:0] {
    CHROMA_A = 2'd0, // -2 58 10 -2   (1/8, reversed: 7/8)
    CHROMA_B = 2'd1, // -4 54 16 -2   (2/8, reversed: 6/8)
    CHROMA_C = 2'd2, // -6 46 28 -4   (3/8, reversed: 5/8)
    CHROMA_D = 2'd3  // -4 36 36 -4   (4/8)
  } chroma_type_e;

  typedef struct packed {
    luma_type_e kind;
    logic       rev;   // taps fed in reverse order
  } luma_sel_t;

  typedef struct packed {
    chroma_type_e kind;
    logic         rev;
  } chroma_sel_t;

  // Quarter-pel fraction (1..3) to luma PE type and tap order.
  function automatic luma_sel_t luma_decode(input logic [1:0] frac);
    luma_sel_t s;
    unique case (frac)
      2'd1:    s = '{kind: LUMA_A, rev: 1'b0};
      2'd3:    s = '{kind: LUMA_A, rev: 1'b1};
      default: s = '{kind: LUMA_B, rev: 1'b0};
    endcase
    return s;
  endfunction

  // Eighth-pel fraction (1..7) to chroma PE type and tap order.
  function automatic chroma_sel_t chroma_decode(input logic [2:0] frac);
    chroma_sel_t s;
    unique case (frac)
      3'd1:    s = '{kind: CHROMA_A, rev: 1'b0};
      3'd2:    s = '{kind: CHROMA_B, rev: 1'b0};
      3'd3:    s = '{kind: CHROMA_C, rev: 1'b0};
      3'd5:    s = '{kind: CHROMA_C, rev: 1'b1};
      3'd6:    s = '{kind: CHROMA_B, rev: 1'b1};
      3'd7:    s = '{kind: CHROMA_A, rev: 1'b1};
      default: s = '{kind: CHROMA_D, rev: 1'b0};
    endcase
    return s;
  endfunction

endpackage
