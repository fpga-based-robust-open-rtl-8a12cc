// Self-checking testbench for clock_generator: counts the enables of each
// output over 200,000 clocks (0.1 s at 2 MHz) and compares with
// floor(cycles * rate / clock); checks that the 15 kHz enable is always 133 or
// 134 clocks apart and that every enable lasts exactly one clock.
module tb_clock_generator;
  localparam int unsigned NCYC = 200_000;
  localparam int unsigned RATES [4] = '{15_000, 1_000_000, 1_000, 100};

  logic clk = 0, rst = 1;
  logic [3:0] clc;
  int checks = 0, failures = 0;

  clock_generator dut (.clk, .rst, .clc);

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cnt [4];
  int     last0, gap_bad;
  logic [3:0] prev;
  initial begin
    cnt = '{0, 0, 0, 0};
    last0 = -1; gap_bad = 0; prev = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);   // first clock out of reset
    for (int c = 0; c < int'(NCYC); c++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) if (clc[k]) cnt[k]++;
      if (clc[0] && prev[0]) gap_bad++;
      if (clc[0]) begin
        if (last0 >= 0 && (c - last0 < 133 || c - last0 > 134)) gap_bad++;
        last0 = c;
      end
      prev = clc;
    end
    for (int k = 0; k < 4; k++) begin
      longint exp_n;
      exp_n = (longint'(NCYC) * RATES[k]) / 2_000_000;
      checks++;
      if (cnt[k] != exp_n) begin
        failures++;
        $display("FAIL clc[%0d]: %0d enables, expected %0d", k, cnt[k], exp_n);
      end
    end
    checks++;
    if (gap_bad != 0) begin
      failures++;
      $display("FAIL 15 kHz enable spacing wrong %0d times", gap_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
