// Self-checking testbench for moving_average (PERIOD_MAX = 64): random fault
// bits with a changing density and a changing window length (including
// PERIOD_MAX); the expected output is the number of ones among the last
// 'period' samples of a software history (fewer right after reset).
module tb_moving_average;
  import fd_pkg::*;
  localparam int PMAX = 64;
  localparam int PW = $clog2(PMAX + 1);
  logic clk = 0, rst = 1, in_valid = 0;
  logic [PW-1:0] period;
  logic [NPH-1:0] y;
  logic [PW-1:0] x_cnt [NPH];
  logic out_valid;
  int checks = 0, failures = 0;

  moving_average #(.PERIOD_MAX(PMAX)) dut (.clk, .rst, .in_valid, .period, .y, .x_cnt, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [NPH][$];
  int periods [8] = '{64, 10, 33, 64, 1, 50, 7, 64};
  initial begin
    y = '0;
    period = PW'(64);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 4000; n++) begin
      int dens;
      if (n % 500 == 0) period = PW'(periods[n / 500]);
      dens = (n / 250) % 4;   // 0, 1/4, 2/4, 3/4 density
      for (int k = 0; k < NPH; k++) y[k] = (($urandom % 4) < dens);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      for (int k = 0; k < NPH; k++) hist[k].push_back(int'(y[k]));
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      for (int k = 0; k < NPH; k++) begin
        int e;
        e = 0;
        for (int j = 0; j < int'(period) && j <= n; j++) e += hist[k][n - j];
        checks++;
        if (int'(x_cnt[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d ph=%0d x=%0d expected %0d", n, k, x_cnt[k], e);
        end
      end
      repeat ($urandom % 2) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
