// Chroma interpolator with filter reuse.
//
// Produces the HEVC prediction samples of one BLK x BLK chroma block (one
// component, Cb or Cr) at an eighth-pel position (frac_x, frac_y) from a
// (BLK+3) x (BLK+3) window, with one chroma_filter array used in both
// directions:
//
//   * frac_y = 0 or frac_x = 0: one horizontal or one vertical pass.
//   * both fractions non-zero: a horizontal pass over all BLK+3 rows, stored
//     and fed back as the input of a vertical pass in the next clock.
//   * integer position (0, 0): the integer samples scaled to 14-bit precision.
//
// Arithmetic is that of HEVC: first-pass sums shifted right by BIT_DEPTH-8,
// second-pass sums by 6, integer samples shifted left by 14-BIT_DEPTH.
//
// Handshake: start is taken when ready is high, and ref_win, frac_x and frac_y
// are read only in that cycle. One-pass blocks complete in one clock
// (out_valid the cycle after start, ready stays high, so a block can start
// every clock); two-pass blocks take two clocks (ready low in the second).
// pred holds its value until the next block completes. Reset is active low,
// synchronous, and clears only the control state.
//
// The 1-2 clock behaviour follows the published architecture; the handshake,
// feedback register and integer-position path are this design's choices.
module chroma_interp
  import interp_pkg::*;
#(
  parameter int BIT_DEPTH = 8,
  parameter int BLK       = 2,
  localparam int WIN      = BLK + 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       ready,
  input  logic [2:0]                 frac_x,
  input  logic [2:0]                 frac_y,
  input  logic [BIT_DEPTH-1:0]       ref_win [WIN][WIN],
  output logic                       out_valid,
  output logic                       two_pass,   // the second pass of a block is running
  output logic signed [PRED_W-1:0]   pred [BLK][BLK]
);

  localparam int ACC_W  = INTER_W + 8;
  localparam int SHIFT1 = BIT_DEPTH - 8;
  localparam int SHIFT3 = PREC - BIT_DEPTH;

  logic       pass2_q;      // second pass runs in this cycle
  logic [2:0] fy_q;
  logic       take, full;
  assign ready    = !pass2_q;
  assign take     = start && ready;
  assign full     = (frac_x == 3'd0) && (frac_y == 3'd0);
  assign two_pass = pass2_q;

  logic signed [INTER_W-1:0] inter_q [WIN][BLK];

  // ---------------------------------------------------------------- input mux
  logic signed [INTER_W-1:0] fwin [WIN][WIN];
  logic                      f_vert;
  logic [2:0]                f_frac;
  logic signed [ACC_W-1:0]   fy [WIN][BLK];

  always_comb begin
    if (pass2_q) begin
      // feedback: stored column j goes to window column j+1
      f_vert = 1'b1;
      f_frac = fy_q;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++)
          fwin[r][c] = (c >= 1 && c < BLK + 1) ? inter_q[r][c - 1] : '0;
    end else begin
      f_vert = (frac_x == 3'd0);
      f_frac = (frac_x == 3'd0) ? frac_y : frac_x;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++)
          fwin[r][c] = INTER_W'(ref_win[r][c]);
    end
  end

  chroma_filter #(.BLK(BLK), .IN_W(INTER_W), .OUT_W(ACC_W)) u_filter (
    .win      (fwin),
    .vertical (f_vert),
    .frac     (f_frac),
    .y        (fy)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk)
    if (!rst_n) begin
      pass2_q   <= 1'b0;
      out_valid <= 1'b0;
      fy_q      <= '0;
    end else begin
      pass2_q   <= take && (frac_x != 3'd0) && (frac_y != 3'd0);
      out_valid <= pass2_q || (take && !((frac_x != 3'd0) && (frac_y != 3'd0)));
      if (take) fy_q <= frac_y;
    end

  // ---------------------------------------------------------------- datapath
  always_ff @(posedge clk)
    if (pass2_q) begin
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++)
          pred[i][j] <= PRED_W'(fy[i + 1][j] >>> SHIFT2);
    end else if (take) begin
      if (frac_x != 3'd0 && frac_y != 3'd0)
        for (int r = 0; r < WIN; r++)
          for (int j = 0; j < BLK; j++)
            inter_q[r][j] <= INTER_W'(fy[r][j] >>> SHIFT1);
      else
        for (int i = 0; i < BLK; i++)
          for (int j = 0; j < BLK; j++)
            pred[i][j] <= full ? PRED_W'(ref_win[i + 1][j + 1]) <<< SHIFT3
                               : PRED_W'(fy[i + 1][j] >>> SHIFT1);
    end

  // The second pass always follows a two-pass start and never overlaps one.
  assert property (@(posedge clk) disable iff (!rst_n) pass2_q |-> !$past(pass2_q));

endmodule
