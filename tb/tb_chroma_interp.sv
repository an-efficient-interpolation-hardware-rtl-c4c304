// Testbench of chroma_interp: random 5x5 reference windows at all 64
// eighth-pel positions, issued at random times including back to back and
// while the unit is busy with a second pass (such starts must be ignored).
// Every result is compared with the reference model, and its latency must be
// 1 clock for one-pass positions and 2 for two-pass positions.
module tb_chroma_interp;
  import interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int BLK = 2, WIN = BLK + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, ready, out_valid, two_pass;
  logic [2:0] frac_x, frac_y;
  logic [7:0] ref_win [WIN][WIN];
  logic signed [PRED_W-1:0] pred [BLK][BLK];

  chroma_interp dut (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
                   .frac_x(frac_x), .frac_y(frac_y), .ref_win(ref_win),
                   .out_valid(out_valid), .two_pass(two_pass), .pred(pred));

  typedef struct {
    int exp [BLK][BLK];
    int issue;
    int lat;
  } job_t;

  job_t q [$];
  int checks = 0, failures = 0, cycle = 0, done = 0;
  int n_h = 0, n_v = 0, n_2d = 0, n_full = 0, n_busy = 0, n_b2b = 0, n_2p_seen = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    chroma_win_t w;
    job_t j;
    bit got_valid;
    rst_n = 1'b0; start = 1'b0; frac_x = '0; frac_y = '0;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) ref_win[r][c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (done < 400) begin
      // results
      got_valid = out_valid;
      if (out_valid) begin
        if (q.size() == 0) fail("result without request");
        else begin
          j = q.pop_front();
          checks++;
          if (cycle - j.issue != j.lat) fail($sformatf("latency %0d expected %0d", cycle - j.issue, j.lat));
          for (int a = 0; a < BLK; a++)
            for (int b = 0; b < BLK; b++) begin
              checks++;
              if (int'(pred[a][b]) !== j.exp[a][b])
                fail($sformatf("pred[%0d][%0d]=%0d expected %0d", a, b, pred[a][b], j.exp[a][b]));
            end
          done++;
        end
      end
      if (two_pass) n_2p_seen++;
      // requests
      start = ($urandom_range(0, 3) != 0);
      frac_x = 3'($urandom_range(0, 7));
      frac_y = 3'($urandom_range(0, 7));
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          ref_win[r][c] = 8'($urandom_range(0, 255));
          if (done % 40 == 7) ref_win[r][c] = ((r + c) % 2 == 0) ? 8'd255 : 8'd0;
          w[r][c] = int'(ref_win[r][c]);
        end
      if (start && ready) begin
        for (int a = 0; a < BLK; a++)
          for (int b = 0; b < BLK; b++)
            j.exp[a][b] = chroma_ref(w, int'(frac_x), int'(frac_y), a, b, 8);
        j.issue = cycle;
        j.lat = (frac_x != 0 && frac_y != 0) ? 2 : 1;
        q.push_back(j);
        if (frac_x == 0 && frac_y == 0) n_full++;
        else if (frac_y == 0) n_h++;
        else if (frac_x == 0) n_v++;
        else n_2d++;
        if (got_valid) n_b2b++;
      end else if (start) n_busy++;
      @(posedge clk);
      cycle++;
      @(negedge clk);
    end
    $display("horizontal %0d vertical %0d two-pass %0d full-pel %0d ignored-busy %0d back-to-back %0d",
             n_h, n_v, n_2d, n_full, n_busy, n_b2b);
    checks++; if (n_h == 0 || n_v == 0 || n_2d == 0 || n_full == 0) fail("a position class never ran");
    checks++; if (n_busy == 0 || n_b2b == 0) fail("busy start or back-to-back start never happened");
    checks++; if (n_2p_seen == 0) fail("two_pass never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
