// Testbench of chroma_filter: random windows (8-bit samples and signed
// first-stage values), both directions, fractions 1..7. Every horizontal-pass
// output (all 5 rows) or vertical-pass output (rows 1..2) is compared with
// the direct 4-tap sum.
module tb_chroma_filter;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int BLK = 2, WIN = BLK + 3;

  logic signed [15:0] win [WIN][WIN];
  logic               vertical;
  logic [2:0]         frac;
  logic signed [23:0] y [WIN][BLK];
  int checks = 0, failures = 0;

  chroma_filter dut (.win(win), .vertical(vertical), .frac(frac), .y(y));

  initial begin
    int s;
    for (int n = 0; n < 280; n++) begin
      vertical = n[0];
      frac     = 3'(1 + (n / 2) % 7);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++)
          win[r][c] = (n < 140) ? 16'($urandom_range(0, 255))
                                : 16'(int'($urandom_range(0, 24000)) - 4000);
      #1;
      for (int r = 0; r < WIN; r++)
        for (int j = 0; j < BLK; j++)
          if (!vertical || (r >= 1 && r < BLK + 1)) begin
            s = 0;
            for (int k = 0; k < 4; k++)
              s += vertical ? chroma_coef(int'(frac), k) * int'(win[r - 1 + k][j + 1])
                            : chroma_coef(int'(frac), k) * int'(win[r][j + k]);
            checks++;
            if (int'(y[r][j]) !== s) begin
              failures++;
              if (failures < 10)
                $display("FAIL n=%0d v=%0d frac=%0d (%0d,%0d): %0d expected %0d",
                         n, vertical, frac, r, j, y[r][j], s);
            end
          end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
