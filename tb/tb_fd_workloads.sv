// Workload testbench for fd_top at its default parameters: the operating
// cases of a fault-tolerant five-phase drive beyond plain sinusoidal faults.
//
// Part 1, non-sinusoidal reconfigured currents. After a phase is lost the
// drive runs the remaining phases with optimized currents containing a
// fundamental and a third harmonic (per-unit magnitudes and angles below,
// 1 pu = 640 LSB = 2.5 A):
//   one faulty phase (a)      b..e I1 .99 .99 1 .98  th1 51 137 232 -41
//                                  I3 .17 .08 .09 .19 th3 23 52 186 -19
//   two adjacent (a, b)       c..e I1 .59 .95 .67    th1 82 218 0
//                                  I3 .12 .29 .16    th3 44 102 41
//   two non-adjacent (a, c)   b,d,e I1 .99 .98 .99   th1 77 2 -42
//                                  I3 .16 .19 .17    th3 15 55 -21
// with i = I1*cos(wt + th1) + I3*cos(3wt + th3). In each mode only the dead
// phases may be flagged (leg code 2 = open phase) and the mode code must be
// 2, 3 and 4 respectively. Then, with phase a still dead, a lower-transistor
// fault is added on phase b (one-faulty-phase currents): b must be flagged.
//
// Part 2, speed and torque transients of a healthy drive, none of which may
// raise a fault signal: acceleration (period 750 -> 300 samples, i.e. speed
// x2.5, over 6 cycles), deceleration (back), braking (torque reversal: all
// currents change sign at once), and reversal (the phase sequence turns
// round instantly). The period input follows the speed sample by sample.
module tb_fd_workloads;
  import fd_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real CLK_PER_SAMPLE = 2_000_000.0 / 15_000.0;
  localparam real PU = 640.0;

  logic clk = 0, rst = 1;
  logic [IW-1:0] adc_code [NPH+1];
  logic [12:0] period;
  logic [11:0] th;
  logic [NPH-1:0] fs;
  leg_code_e leg_code [NPH];
  op_mode_e fc;
  ang_t d [NPH];
  logic [NPH-1:0] pu;
  logic [IW-1:0] theta;
  logic [1:0] clc_aux;
  int checks = 0, failures = 0;

  fd_top dut (.clk, .rst, .adc_code, .period, .th, .fs, .leg_code, .fc, .d, .pu, .theta, .clc_aux);

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- plant model: per-phase harmonic content, phase accumulator ----------
  real i1 [NPH], t1 [NPH], i3 [NPH], t3 [NPH];   // pu, degrees
  logic [NPH-1:0] lower_fault;
  real wt;            // electrical angle, radians
  real per_samples;   // current fundamental period in samples
  real dir;           // +1 forward, -1 reversed
  real sgn;           // +1 motoring, -1 braking

  task automatic set_healthy();
    for (int k = 0; k < NPH; k++) begin
      i1[k] = 1.0; t1[k] = -72.0 * k; i3[k] = 0.0; t3[k] = 0.0;
    end
  endtask

  always @(negedge clk) begin
    if (!rst) wt = wt + dir * 2.0 * PI / (per_samples * CLK_PER_SAMPLE);
    for (int k = 0; k < NPH; k++) begin
      real v;
      int iv;
      v = sgn * PU * (i1[k] * $cos(wt + t1[k] * PI / 180.0)
                    + i3[k] * $cos(3.0 * wt + t3[k] * PI / 180.0));
      if (lower_fault[k]) v = (v + 0.3 * PU > 0.0) ? v + 0.3 * PU : 0.0;
      iv = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
      adc_code[k] = IW'(iv + 2048);
    end
    adc_code[NPH] = 12'd0;
    period = 13'($rtoi(per_samples + 0.5));
  end

  // ---- monitors ---------------------------------------------------------------
  logic watch_false;
  int   n_false, n_late, n_samples;
  longint tc = 0, samp_clk = 0;
  always @(posedge clk) begin
    tc <= tc + 1;
    if (!rst) begin
      if (dut.clc[0]) begin samp_clk = tc; n_samples++; end
      if (dut.d_valid && tc - samp_clk > 133) n_late++;
      if (watch_false && fs != '0) n_false++;
    end
  end

  task automatic run_cycles(real n);
    repeat ($rtoi(n * per_samples * CLK_PER_SAMPLE)) @(posedge clk);
    #1;
  endtask

  task automatic expect_state(string what, logic [NPH-1:0] e_fs, int e_fc, int e_leg [NPH]);
    checks++;
    if (fs != e_fs) begin failures++; $display("FAIL %s: FS %b expected %b", what, fs, e_fs); end
    checks++;
    if (int'(fc) != e_fc) begin failures++; $display("FAIL %s: mode %0d expected %0d", what, fc, e_fc); end
    for (int k = 0; k < NPH; k++) begin
      checks++;
      if (e_leg[k] >= 0 && int'(leg_code[k]) != e_leg[k]) begin
        failures++; $display("FAIL %s: leg %0d code %0d expected %0d", what, k, leg_code[k], e_leg[k]);
      end
    end
    $display("  %-34s FS=%b mode=%0d", what, fs, fc);
  endtask

  initial begin
    int L [NPH];
    n_false = 0; n_late = 0; n_samples = 0;
    wt = 0.0; per_samples = 300.0; dir = 1.0; sgn = 1.0;
    lower_fault = '0;
    set_healthy();
    watch_false = 0;
    th = 12'd819;   // 0.2
    for (int k = 0; k <= NPH; k++) adc_code[k] = 12'd2048;
    period = 13'd300;
    repeat (5) @(posedge clk);
    rst <= 0;

    // ---- part 1: reconfigured, non-sinusoidal operation ----
    i1 = '{0.0, 0.99, 0.99, 1.0, 0.98};  t1 = '{0.0, 51.0, 137.0, 232.0, -41.0};
    i3 = '{0.0, 0.17, 0.08, 0.09, 0.19};  t3 = '{0.0, 23.0, 52.0, 186.0, -19.0};
    run_cycles(5);
    L = '{2, 0, 0, 0, 0};
    expect_state("one faulty phase (a)", 5'b00001, 2, L);

    i1 = '{0.0, 0.0, 0.59, 0.95, 0.67};  t1 = '{0.0, 0.0, 82.0, 218.0, 0.0};
    i3 = '{0.0, 0.0, 0.12, 0.29, 0.16};  t3 = '{0.0, 0.0, 44.0, 102.0, 41.0};
    run_cycles(5);
    L = '{2, 2, 0, 0, 0};
    expect_state("two adjacent faulty phases (a,b)", 5'b00011, 3, L);

    i1 = '{0.0, 0.99, 0.0, 0.98, 0.99};  t1 = '{0.0, 77.0, 0.0, 2.0, -42.0};
    i3 = '{0.0, 0.16, 0.0, 0.19, 0.17};  t3 = '{0.0, 15.0, 0.0, 55.0, -21.0};
    run_cycles(5);
    L = '{2, 0, 2, 0, 0};
    expect_state("two non-adjacent (a,c)", 5'b00101, 4, L);

    i1 = '{0.0, 0.99, 0.99, 1.0, 0.98};  t1 = '{0.0, 51.0, 137.0, 232.0, -41.0};
    i3 = '{0.0, 0.17, 0.08, 0.09, 0.19};  t3 = '{0.0, 23.0, 52.0, 186.0, -19.0};
    run_cycles(4);
    L = '{2, 0, 0, 0, 0};
    expect_state("a dead, healthy again", 5'b00001, 2, L);
    lower_fault[1] = 1'b1;
    run_cycles(4);
    L = '{2, 1, 0, 0, 0};
    expect_state("a dead + lower switch b", 5'b00011, 3, L);

    // ---- part 2: healthy transients ----
    lower_fault = '0;
    set_healthy();
    per_samples = 750.0;
    run_cycles(3);
    L = '{0, 0, 0, 0, 0};
    expect_state("healthy at low speed", 5'b00000, 1, L);
    watch_false = 1;
    // acceleration: period 750 -> 300 in 6 cycles of the changing speed
    for (int s = 0; s < 60; s++) begin
      per_samples = 750.0 - 450.0 * (s + 1) / 60.0;
      repeat ($rtoi(per_samples * CLK_PER_SAMPLE / 10.0)) @(posedge clk);
    end
    run_cycles(2);
    expect_state("after acceleration", 5'b00000, 1, L);
    for (int s = 0; s < 60; s++) begin
      per_samples = 300.0 + 450.0 * (s + 1) / 60.0;
      repeat ($rtoi(per_samples * CLK_PER_SAMPLE / 10.0)) @(posedge clk);
    end
    run_cycles(2);
    expect_state("after deceleration", 5'b00000, 1, L);
    per_samples = 400.0;
    run_cycles(3);
    sgn = -1.0;
    run_cycles(3);
    expect_state("after braking", 5'b00000, 1, L);
    dir = -1.0;
    run_cycles(3);
    expect_state("after reversal", 5'b00000, 1, L);

    checks++;
    if (n_false != 0) begin failures++; $display("FAIL %0d clocks with a false alarm in part 2", n_false); end
    checks++;
    if (n_late != 0) begin failures++; $display("FAIL %0d late angle sets", n_late); end
    checks++;
    if (n_samples == 0) begin failures++; $display("FAIL no samples"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
