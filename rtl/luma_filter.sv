// Parallel luma filter: an array of (BLK+7) x BLK luma PEs.
//
// A BLK x BLK luma block needs a (BLK+7) x (BLK+7) window of samples (taps at
// -3..+4 around each output). Window index (r, c) holds the sample at row
// r-3, column c-3 relative to the block's top-left integer sample.
//
// Horizontal pass: PE (r, j) filters window row r, taps win[r][j..j+7]
// (reversed, win[r][j+7..j+1], for the three-quarter set). All BLK+7 rows are
// produced, which is what a following vertical pass needs.
// Vertical pass: only the BLK rows of PEs at r = 3..BLK+2 are used; PE (r, j)
// filters window column j+3, taps win[r-3 .. r+4][j+3]. Other PEs keep their
// horizontal routing and their outputs are don't-care.
//
// The PE pipeline register gives one cycle of latency: y belongs to the
// window, direction and fraction presented in the previous cycle with en high.
//
// The array size and the use of rows 3..6 for vertical filtering follow the
// published architecture; the exact tap routing is this design's.
module luma_filter
  import interp_pkg::*;
#(
  parameter int BLK   = 4,
  parameter int IN_W  = INTER_W,
  parameter int OUT_W = INTER_W + 8,
  localparam int WIN  = BLK + 7
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  win [WIN][WIN],
  input  logic                    vertical,   // 0: horizontal pass, 1: vertical pass
  input  logic [1:0]              frac,       // quarter-pel fraction 1..3 of this pass
  output logic signed [OUT_W-1:0] y [WIN][BLK]
);

  luma_sel_t sel;
  assign sel = luma_decode(frac);

  for (genvar r = 0; r < WIN; r++) begin : g_row
    for (genvar j = 0; j < BLK; j++) begin : g_col
      logic signed [IN_W-1:0] taps [8];
      if (r >= 3 && r < BLK + 3) begin : g_hv
        always_comb
          for (int k = 0; k < 8; k++)
            if (vertical)
              taps[k] = sel.rev ? win[r + 4 - k][j + 3] : win[r - 3 + k][j + 3];
            else
              taps[k] = sel.rev ? win[r][j + 7 - k] : win[r][j + k];
      end else begin : g_h
        always_comb
          for (int k = 0; k < 8; k++)
            taps[k] = sel.rev ? win[r][j + 7 - k] : win[r][j + k];
      end

      luma_pe #(.IN_W(IN_W), .OUT_W(OUT_W)) u_pe (
        .clk  (clk),
        .en   (en),
        .p    (taps),
        .kind (sel.kind),
        .y    (y[r][j])
      );
    end
  end

endmodule
