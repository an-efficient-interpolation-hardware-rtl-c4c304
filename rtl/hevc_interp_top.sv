// HEVC inter-prediction interpolator: luma and chroma units side by side.
//
// The luma unit interpolates one 4x4 luma block at quarter-pel precision from
// an 11x11 reference window in 2 clocks (a, b, c, d, h, n and integer
// positions) or 4 clocks (the other nine positions, by filter reuse). The
// chroma unit interpolates one 2x2 chroma block of one component at
// eighth-pel precision from a 5x5 window in 1 or 2 clocks; Cb and Cr of a
// prediction block are two successive chroma requests. Each unit has its own
// start/ready request and out_valid result handshake (see luma_interp and
// chroma_interp); they run independently, so a scheduler may overlap them.
// Bi-directional prediction is two requests, one per reference picture.
// Outputs are the 14-bit-precision HEVC prediction samples that weighted
// sample prediction consumes.
//
// Running the two units concurrently is this design's choice; the published
// cycle budget counts them one after the other.
module hevc_interp_top
  import interp_pkg::*;
#(
  parameter int BIT_DEPTH = 8,
  parameter int LUMA_BLK  = 4,
  parameter int CHROMA_BLK = 2,
  localparam int LWIN = LUMA_BLK + 7,
  localparam int CWIN = CHROMA_BLK + 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // luma request / result
  input  logic                      l_start,
  output logic                      l_ready,
  input  logic [1:0]                l_frac_x,
  input  logic [1:0]                l_frac_y,
  input  logic [BIT_DEPTH-1:0]      l_ref [LWIN][LWIN],
  output logic                      l_valid,
  output logic                      l_two_pass,
  output logic signed [PRED_W-1:0]  l_pred [LUMA_BLK][LUMA_BLK],
  // chroma request / result
  input  logic                      c_start,
  output logic                      c_ready,
  input  logic [2:0]                c_frac_x,
  input  logic [2:0]                c_frac_y,
  input  logic [BIT_DEPTH-1:0]      c_ref [CWIN][CWIN],
  output logic                      c_valid,
  output logic                      c_two_pass,
  output logic signed [PRED_W-1:0]  c_pred [CHROMA_BLK][CHROMA_BLK]
);

  luma_interp #(.BIT_DEPTH(BIT_DEPTH), .BLK(LUMA_BLK)) u_luma (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (l_start),
    .ready     (l_ready),
    .frac_x    (l_frac_x),
    .frac_y    (l_frac_y),
    .ref_win   (l_ref),
    .out_valid (l_valid),
    .two_pass  (l_two_pass),
    .pred      (l_pred)
  );

  chroma_interp #(.BIT_DEPTH(BIT_DEPTH), .BLK(CHROMA_BLK)) u_chroma (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (c_start),
    .ready     (c_ready),
    .frac_x    (c_frac_x),
    .frac_y    (c_frac_y),
    .ref_win   (c_ref),
    .out_valid (c_valid),
    .two_pass  (c_two_pass),
    .pred      (c_pred)
  );

endmodule
