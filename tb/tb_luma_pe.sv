// Testbench of luma_pe: random signed taps, both coefficient sets, checked
// against the direct 7-tap / 8-tap sums one clock after the inputs (the PE's
// pipeline register), and that a low enable holds the previous result.
module tb_luma_pe;
  import interp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    en;
  logic signed [15:0]      p [8];
  luma_type_e              kind;
  logic signed [23:0]      y;
  int checks = 0, failures = 0;

  luma_pe dut (.clk(clk), .en(en), .p(p), .kind(kind), .y(y));

  function automatic int expect_sum(luma_type_e t, logic signed [15:0] v [8]);
    int ca [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};
    int cb [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int s = 0;
    for (int k = 0; k < 8; k++) s += (t == LUMA_B ? cb[k] : ca[k]) * int'(v[k]);
    return s;
  endfunction

  task automatic check(int exp, string what);
    checks++;
    if (int'(y) !== exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  initial begin
    int exp;
    en = 1'b0;
    kind = LUMA_A;
    for (int k = 0; k < 8; k++) p[k] = '0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      kind = luma_type_e'($urandom_range(0, 1));
      for (int k = 0; k < 8; k++)
        p[k] = (n < 200) ? 16'($urandom_range(0, 255))
                         : 16'(int'($urandom_range(0, 28000)) - 6000);
      if (n % 50 == 0) for (int k = 0; k < 8; k++) p[k] = (k == n / 50 % 8) ? 16'sd255 : 16'sd0;
      en = 1'b1;
      exp = expect_sum(kind, p);
      @(negedge clk);
      check(exp, "after one clock");
      // hold: enable low, inputs change, output must not
      en = 1'b0;
      for (int k = 0; k < 8; k++) p[k] = 16'($urandom_range(0, 255));
      kind = luma_type_e'(~kind);
      @(negedge clk);
      check(exp, "hold with en low");
    end
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
