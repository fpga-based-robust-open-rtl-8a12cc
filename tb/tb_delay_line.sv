// Self-checking testbench for delay_line (PERIOD_MAX = 64, 16-sample buffer):
// random samples arrive at random intervals; the period is changed several
// times, including to PERIOD_MAX itself. A software history of every sample
// gives the expected delayed value i(n - floor(period/4)), or 0 while fewer
// samples than that have been stored. 'out_valid' must follow 'in_valid' by
// one clock, and 'primed' must be high exactly when a real delayed sample
// is output.
module tb_delay_line;
  import fd_pkg::*;
  localparam int PMAX = 64;
  localparam int PW = $clog2(PMAX + 1);

  logic clk = 0, rst = 1, in_valid = 0;
  logic [PW-1:0] period;
  cur_t i_in [NPH], i_out [NPH], i_d [NPH];
  logic primed, out_valid;
  int checks = 0, failures = 0;

  delay_line #(.PERIOD_MAX(PMAX)) dut (.clk, .rst, .in_valid, .period, .i_in, .i_out, .i_d, .primed, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [NPH][$];
  int periods [6] = '{64, 40, 4, 17, 64, 23};
  initial begin
    for (int k = 0; k < NPH; k++) i_in[k] = '0;
    period = PW'(periods[0]);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int q;
      if (n % 500 == 0) period = PW'(periods[n / 500]);
      q = int'(period) / 4;
      for (int k = 0; k < NPH; k++) i_in[k] = cur_t'($urandom);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      for (int k = 0; k < NPH; k++) hist[k].push_back(int'(i_in[k]));
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing at %0d", n); end
      if (primed != (n >= q)) begin failures++; $display("FAIL primed %0b at n=%0d q=%0d", primed, n, q); end
      for (int k = 0; k < NPH; k++) begin
        int e;
        e = (n >= q) ? hist[k][n - q] : 0;
        checks += 2;
        if (int'(i_d[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d ph=%0d q=%0d i_d=%0d expected %0d", n, k, q, i_d[k], e);
        end
        if (int'(i_out[k]) != hist[k][n]) begin failures++; $display("FAIL i_out n=%0d", n); end
      end
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
