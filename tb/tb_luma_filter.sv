// Testbench of luma_filter: random windows (8-bit samples and signed
// first-stage values), both directions, fractions 1..3. One clock after the
// inputs every horizontal-pass PE output (all 11 rows) or every vertical-pass
// output (rows 3..6) is compared with the direct filter sum.
module tb_luma_filter;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int BLK = 4, WIN = BLK + 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               en;
  logic signed [15:0] win [WIN][WIN];
  logic               vertical;
  logic [1:0]         frac;
  logic signed [23:0] y [WIN][BLK];
  int checks = 0, failures = 0;

  luma_filter dut (.clk(clk), .en(en), .win(win), .vertical(vertical), .frac(frac), .y(y));

  initial begin
    int exp [WIN][BLK];
    int s;
    en = 1'b0; vertical = 1'b0; frac = 2'd1;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) win[r][c] = '0;
    @(negedge clk);
    for (int n = 0; n < 120; n++) begin
      vertical = n[0];
      frac     = 2'(1 + (n / 2) % 3);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++)
          win[r][c] = (n < 60) ? 16'($urandom_range(0, 255))
                               : 16'(int'($urandom_range(0, 28000)) - 6000);
      for (int r = 0; r < WIN; r++)
        for (int j = 0; j < BLK; j++) begin
          s = 0;
          for (int k = 0; k < 8; k++)
            s += vertical ? luma_coef(int'(frac), k) * int'(win[r - 3 + k < 0 ? 0 : (r - 3 + k > WIN - 1 ? WIN - 1 : r - 3 + k)][j + 3])
                          : luma_coef(int'(frac), k) * int'(win[r][j + k]);
          exp[r][j] = s;
        end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      for (int r = 0; r < WIN; r++)
        for (int j = 0; j < BLK; j++)
          if (!vertical || (r >= 3 && r < BLK + 3)) begin
            checks++;
            if (int'(y[r][j]) !== exp[r][j]) begin
              failures++;
              if (failures < 10)
                $display("FAIL n=%0d v=%0d frac=%0d (%0d,%0d): %0d expected %0d",
                         n, vertical, frac, r, j, y[r][j], exp[r][j]);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
