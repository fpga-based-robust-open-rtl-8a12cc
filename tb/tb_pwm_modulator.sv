// Self-checking testbench for pwm_modulator: holds a random angle per channel
// for whole carrier periods and measures each output's high time over a full
// period (256 ticks); it must equal the duty (D + 32768) >> 8, i.e. -pi gives
// 0 and +pi 255 of 256. Ticks come every third clock; the output must not
// change between ticks.
module tb_pwm_modulator;
  import fd_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  ang_t d [NPH];
  logic [NPH-1:0] pu;
  int checks = 0, failures = 0;

  pwm_modulator #(.RES(8)) dut (.clk, .rst, .tick, .d, .pu);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high [NPH];
    logic [NPH-1:0] prev;
    for (int k = 0; k < NPH; k++) d[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 40; p++) begin
      for (int k = 0; k < NPH; k++) begin
        if (p == 1) d[k] = (k == 0) ? -16'sd32768 : 16'sd32767;
        else d[k] = ang_t'($urandom);
      end
      // let one full carrier period pass so the new duties are loaded
      for (int t = 0; t < 256 * 3; t++) begin
        tick = (t % 3 == 0);
        @(posedge clk); #1;
      end
      for (int k = 0; k < NPH; k++) high[k] = 0;
      for (int t = 0; t < 256 * 3; t++) begin
        tick = (t % 3 == 0);
        prev = pu;
        @(posedge clk); #1;
        for (int k = 0; k < NPH; k++) if (pu[k]) high[k]++;
        if (!tick && pu != prev) begin failures++; checks++; $display("FAIL change without tick"); end
      end
      tick = 0;
      for (int k = 0; k < NPH; k++) begin
        int e;
        e = 3 * ((int'(d[k]) + 32768) / 256);
        checks++;
        if (high[k] != e) begin
          failures++; $display("FAIL ch%0d D=%0d high=%0d expected %0d", k, d[k], high[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
