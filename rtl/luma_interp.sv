// Luma interpolator with filter reuse.
//
// Produces the HEVC prediction samples of one BLK x BLK luma block at a
// quarter-pel position (frac_x, frac_y) from a (BLK+7) x (BLK+7) window of
// reference samples, using one luma_filter array for both directions:
//
//   * a, b, c (frac_y = 0): one horizontal pass, rows 3..BLK+2 of the array.
//   * d, h, n (frac_x = 0): one vertical pass straight on the reference window.
//   * the other nine positions: a horizontal pass over all BLK+7 rows, whose
//     results are stored and fed back through the input multiplexer into a
//     second, vertical pass (filter reuse).
//   * integer position (0, 0): the integer samples scaled to 14-bit precision.
//
// Arithmetic is that of the HEVC fractional sample interpolation: first-pass
// sums are shifted right by BIT_DEPTH-8, second-pass sums by 6, integer
// samples shifted left by 14-BIT_DEPTH. pred holds the 14-bit-precision
// prediction samples that weighted prediction consumes.
//
// Handshake: start is taken when ready is high; ref_win, frac_x and frac_y are
// read only in that cycle. Each pass takes two clocks (PE pipeline register,
// then result register), so out_valid pulses 2 cycles after start for one-pass
// positions and 4 cycles after start for two-pass positions; ready is high
// again in that same cycle, so blocks can follow back to back. pred holds its
// value until the next block completes. Reset is active low, synchronous to
// clk, and clears only the control state.
//
// The pass structure and cycle counts follow the published architecture; the
// handshake, the feedback register, the widths and the integer-position path
// are this design's choices.
module luma_interp
  import interp_pkg::*;
#(
  parameter int BIT_DEPTH = 8,
  parameter int BLK       = 4,
  localparam int WIN      = BLK + 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       ready,
  input  logic [1:0]                 frac_x,
  input  logic [1:0]                 frac_y,
  input  logic [BIT_DEPTH-1:0]       ref_win [WIN][WIN],
  output logic                       out_valid,
  output logic                       two_pass,   // the block in flight uses filter reuse
  output logic signed [PRED_W-1:0]   pred [BLK][BLK]
);

  localparam int ACC_W  = INTER_W + 8;
  localparam int SHIFT1 = BIT_DEPTH - 8;
  localparam int SHIFT3 = PREC - BIT_DEPTH;

  typedef enum logic [1:0] {
    S_IDLE,     // ready; first cycle of the first pass on start
    S_PASS1,    // second cycle of the first pass
    S_PASS2A,   // first cycle of the second (vertical) pass
    S_PASS2B    // second cycle of the second pass
  } state_e;

  state_e state;
  logic   twod_q, full_q;
  logic [1:0] fy_q;

  logic take;
  assign ready = (state == S_IDLE);
  assign take  = start && ready;
  assign two_pass = twod_q && (state != S_IDLE);

  // Stored first-pass rows (fed back) and integer samples of a full-pel block.
  logic signed [INTER_W-1:0] inter_q [WIN][BLK];

  // ---------------------------------------------------------------- input mux
  logic signed [INTER_W-1:0] fwin [WIN][WIN];
  logic                      f_vert;
  logic [1:0]                f_frac;
  logic                      f_en;
  logic signed [ACC_W-1:0]   fy [WIN][BLK];

  always_comb begin
    f_en   = 1'b0;
    f_vert = 1'b0;
    f_frac = 2'd2;
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        fwin[r][c] = INTER_W'(ref_win[r][c]);
    if (state == S_PASS2A) begin
      // feedback: stored column j goes to window column j+3
      f_en   = 1'b1;
      f_vert = 1'b1;
      f_frac = fy_q;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++)
          fwin[r][c] = (c >= 3 && c < BLK + 3) ? inter_q[r][c - 3] : '0;
    end else if (take) begin
      f_en   = 1'b1;
      f_vert = (frac_x == 2'd0);
      f_frac = (frac_x == 2'd0) ? frac_y : frac_x;
    end
  end

  luma_filter #(.BLK(BLK), .IN_W(INTER_W), .OUT_W(ACC_W)) u_filter (
    .clk      (clk),
    .en       (f_en),
    .win      (fwin),
    .vertical (f_vert),
    .frac     (f_frac),
    .y        (fy)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk)
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      twod_q    <= 1'b0;
      full_q    <= 1'b0;
      fy_q      <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE:
          if (take) begin
            twod_q <= (frac_x != 2'd0) && (frac_y != 2'd0);
            full_q <= (frac_x == 2'd0) && (frac_y == 2'd0);
            fy_q   <= frac_y;
            state  <= S_PASS1;
          end
        S_PASS1: begin
          state     <= twod_q ? S_PASS2A : S_IDLE;
          out_valid <= !twod_q;
        end
        S_PASS2A: state <= S_PASS2B;
        default: begin
          state     <= S_IDLE;
          out_valid <= 1'b1;
        end
      endcase
    end

  // ---------------------------------------------------------------- datapath
  always_ff @(posedge clk) begin
    if (take && frac_x == 2'd0 && frac_y == 2'd0)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++)
          inter_q[i + 3][j] <= INTER_W'(ref_win[i + 3][j + 3]);
    if (state == S_PASS1) begin
      if (twod_q)
        for (int r = 0; r < WIN; r++)
          for (int j = 0; j < BLK; j++)
            inter_q[r][j] <= INTER_W'(fy[r][j] >>> SHIFT1);
      else
        for (int i = 0; i < BLK; i++)
          for (int j = 0; j < BLK; j++)
            pred[i][j] <= full_q ? PRED_W'(inter_q[i + 3][j]) <<< SHIFT3
                                 : PRED_W'(fy[i + 3][j] >>> SHIFT1);
    end
    if (state == S_PASS2B)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++)
          pred[i][j] <= PRED_W'(fy[i + 3][j] >>> SHIFT2);
  end

  // A new block is accepted only while idle, and results appear only at the
  // end of a pass.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> $past(state) inside {S_PASS1, S_PASS2B});
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S_IDLE) |-> !ready);

endmodule
