// Parallel chroma filter: an array of (BLK+3) x BLK chroma PEs.
//
// A BLK x BLK chroma block needs a (BLK+3) x (BLK+3) window (taps at -1..+2
// around each output). Window index (r, c) holds the sample at row r-1,
// column c-1 relative to the block's top-left integer sample.
//
// Horizontal pass: PE (r, j) filters window row r, taps win[r][j..j+3]
// (reversed, win[r][j+3..j], for the 5/8, 6/8 and 7/8 sets); all BLK+3 rows
// are produced for a following vertical pass.
// Vertical pass: the BLK rows of PEs at r = 1..BLK filter window column j+1,
// taps win[r-1 .. r+2][j+1]; the other PEs' outputs are don't-care.
//
// The array is combinational; the chroma interpolator registers its outputs,
// so one pass takes one clock.
//
// The 2x5 array follows the published architecture; its arrangement and tap
// routing mirror the luma array and are this design's.
module chroma_filter
  import interp_pkg::*;
#(
  parameter int BLK   = 2,
  parameter int IN_W  = INTER_W,
  parameter int OUT_W = INTER_W + 8,
  localparam int WIN  = BLK + 3
) (
  input  logic signed [IN_W-1:0]  win [WIN][WIN],
  input  logic                    vertical,   // 0: horizontal pass, 1: vertical pass
  input  logic [2:0]              frac,       // eighth-pel fraction 1..7 of this pass
  output logic signed [OUT_W-1:0] y [WIN][BLK]
);

  chroma_sel_t sel;
  assign sel = chroma_decode(frac);

  for (genvar r = 0; r < WIN; r++) begin : g_row
    for (genvar j = 0; j < BLK; j++) begin : g_col
      logic signed [IN_W-1:0] taps [4];
      if (r >= 1 && r < BLK + 1) begin : g_hv
        always_comb
          for (int k = 0; k < 4; k++)
            if (vertical)
              taps[k] = sel.rev ? win[r + 2 - k][j + 1] : win[r - 1 + k][j + 1];
            else
              taps[k] = sel.rev ? win[r][j + 3 - k] : win[r][j + k];
      end else begin : g_h
        always_comb
          for (int k = 0; k < 4; k++)
            taps[k] = sel.rev ? win[r][j + 3 - k] : win[r][j + k];
      end

      chroma_pe #(.IN_W(IN_W), .OUT_W(OUT_W)) u_pe (
        .p    (taps),
        .kind (sel.kind),
        .y    (y[r][j])
      );
    end
  end

endmodule
