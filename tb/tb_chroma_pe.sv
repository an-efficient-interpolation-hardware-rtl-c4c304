// Testbench of chroma_pe: random signed taps and all four coefficient sets,
// checked against the direct 4-tap sums (combinational PE).
module tb_chroma_pe;
  import interp_pkg::*;

  logic signed [15:0] p [4];
  chroma_type_e       kind;
  logic signed [23:0] y;
  int checks = 0, failures = 0;

  chroma_pe dut (.p(p), .kind(kind), .y(y));

  function automatic int expect_sum(chroma_type_e t, logic signed [15:0] v [4]);
    int c [4][4] = '{'{-2, 58, 10, -2}, '{-4, 54, 16, -2}, '{-6, 46, 28, -4}, '{-4, 36, 36, -4}};
    int s = 0;
    for (int k = 0; k < 4; k++) s += c[int'(t)][k] * int'(v[k]);
    return s;
  endfunction

  initial begin
    int exp;
    for (int n = 0; n < 800; n++) begin
      kind = chroma_type_e'(n % 4);
      for (int k = 0; k < 4; k++)
        p[k] = (n < 400) ? 16'($urandom_range(0, 255))
                         : 16'(int'($urandom_range(0, 24000)) - 4000);
      if (n < 16) for (int k = 0; k < 4; k++) p[k] = (k == n / 4) ? 16'sd1 : 16'sd0;
      #1;
      exp = expect_sum(kind, p);
      checks++;
      if (int'(y) !== exp) begin
        failures++;
        $display("FAIL type %0d: y=%0d expected %0d", kind, y, exp);
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
