// End-to-end testbench for fd_top at its default parameters (2 MHz clock,
// 15 kHz sampling, PERIOD_MAX 4096). It models the five phase currents of the
// drive as sinusoids 72 degrees apart, 2.5 A (640 LSB at 1/256 A) peak, with
// a fundamental of 300 samples (50 Hz), and injects faults by reshaping a
// phase's current:
//   lower transistor open : i = max(A*(sin + 0.3), 0)   (only positive current)
//   upper transistor open : i = min(A*(sin - 0.3), 0)
//   open phase            : i = 0
// The offset stands for the controller pushing the faulty phase. TH is 0.2.
//
// Scenario (in fundamental cycles): healthy 5, 50 % current step up 3, step
// down 3, lower fault on a 4, plus upper fault on b 4, all cleared 3, open
// phase a 4, plus open c 4, plus open d 3. At the end of each segment FS,
// the leg codes and the mode code are compared with the expected values.
// Throughout: D of every phase during healthy operation is compared with the
// analytic value pi - phase (tolerance 150/32768 of pi), no FS may appear
// in healthy segments (including the load steps), every sample's five angles
// must be ready within one sample period, and the open-phase fault must be
// flagged within a quarter cycle. Each mechanism of the design is counted and
// must have occurred at least once.
module tb_fd_top;
  import fd_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  PER = 300;                 // samples per fundamental cycle
  localparam int  TCLK = 40_000;             // clocks per fundamental cycle
  localparam int  AMP = 640;

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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- plant model ----------------------------------------------------------
  typedef enum int {OK = 0, LOWER = 1, UPPER = 2, OPENPH = 3} pmode_t;
  pmode_t pm [NPH];
  real    amp;
  longint tc = 0;          // clock counter
  logic   healthy_seg;

  function automatic real phase_of(longint t, int k);
    return 2.0 * PI * real'(t % TCLK) / real'(TCLK) - 2.0 * PI * k / 5.0;
  endfunction

  always @(negedge clk) begin
    for (int k = 0; k < NPH; k++) begin
      real s, v;
      int iv;
      s = $sin(phase_of(tc, k));
      case (pm[k])
        LOWER:   v = (s + 0.3 > 0.0) ? amp * (s + 0.3) : 0.0;
        UPPER:   v = (s - 0.3 < 0.0) ? amp * (s - 0.3) : 0.0;
        OPENPH:  v = 0.0;
        default: v = amp * s;
      endcase
      iv = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
      adc_code[k] = IW'(iv + 2048);
    end
    adc_code[NPH] = IW'(tc % 4096);
  end

  // ---- mechanism counters and continuous checks -------------------------------
  int n_samples, n_cordic_seq, n_late, n_dchecked, n_dbad, n_false, n_pwm_edges;
  int n_fs_rise, n_window_full, n_transient_samples, n_aux;
  longint step_tc = -1_000_000;   // time of the last current step
  int seen_leg [4];
  int seen_mode [6];
  longint samp_tc, samp_clk;
  logic [NPH-1:0] fs_q;
  logic [NPH-1:0] pu_q;

  always @(posedge clk) begin
    tc <= tc + 1;
    if (!rst) begin
      if (dut.clc[0]) begin samp_tc = tc; samp_clk = tc; n_samples++; end
      if (dut.d_valid) begin
        n_cordic_seq++;
        if (tc - samp_clk > 133) n_late++;
        // D is only defined as pi - phase once i(t - T/4) has the same amplitude
        if (healthy_seg && n_samples > 2 * PER && samp_tc - step_tc > TCLK / 4 + 300) begin
          for (int k = 0; k < NPH; k++) begin
            real e;
            int ei, err;
            e = PI - phase_of(samp_tc, k);
            ei = $rtoi(e / PI * 32768.0);
            err = int'(d[k]) - ei;
            err = ((err % 65536) + 65536 + 32768) % 65536 - 32768;
            n_dchecked++;
            if (err > 150 || err < -150) begin
              n_dbad++;
              if (n_dbad < 5) $display("D mismatch ph %0d: %0d expected %0d", k, d[k], ei);
            end
          end
        end
      end
      if (healthy_seg && fs != '0) n_false++;
      if (healthy_seg && amp != real'(AMP)) n_transient_samples++;
      for (int k = 0; k < NPH; k++) if (fs[k] && !fs_q[k]) begin n_fs_rise++; $display("    FS rise phase %0d at cycle %0.2f", k, real'(tc) / TCLK); end
      if (dut.u_avg.fill >= 13'(PER)) n_window_full++;
      if (pu != pu_q) n_pwm_edges++;
      if (clc_aux != '0) n_aux++;
      fs_q <= fs;
      pu_q <= pu;
      seen_mode[int'(fc)]++;
      for (int k = 0; k < NPH; k++)
        case (leg_code[k])
          LEG_OK: seen_leg[0]++; LEG_LOWER: seen_leg[1]++; LEG_UPPER: seen_leg[2]++;
          LEG_OPEN: seen_leg[3]++; default: ;
        endcase
    end
  end

  // ---- scenario ---------------------------------------------------------------
  task automatic run_cycles(int n);
    repeat (n * TCLK) @(posedge clk);
    #1;
  endtask

  task automatic expect_state(string what, logic [NPH-1:0] e_fs, int e_fc, leg_code_e e_leg [NPH]);
    checks++;
    if (fs != e_fs) begin failures++; $display("FAIL %s: FS %b expected %b", what, fs, e_fs); end
    checks++;
    if (int'(fc) != e_fc) begin failures++; $display("FAIL %s: mode %0d expected %0d", what, fc, e_fc); end
    for (int k = 0; k < NPH; k++) begin
      checks++;
      if (leg_code[k] != e_leg[k]) begin
        failures++; $display("FAIL %s: leg %0d code %0d expected %0d", what, k, leg_code[k], e_leg[k]);
      end
    end
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    leg_code_e L [NPH];
    longint t0;
    int det;
    n_samples = 0; n_cordic_seq = 0; n_late = 0; n_dchecked = 0; n_dbad = 0; n_false = 0;
    n_pwm_edges = 0; n_fs_rise = 0; n_window_full = 0; n_transient_samples = 0; n_aux = 0;
    seen_leg = '{0, 0, 0, 0}; seen_mode = '{0, 0, 0, 0, 0, 0};
    fs_q = '0; pu_q = '0;
    for (int k = 0; k < NPH; k++) begin pm[k] = OK; L[k] = LEG_OK; end
    for (int k = 0; k <= NPH; k++) adc_code[k] = 12'd2048;
    amp = real'(AMP);
    healthy_seg = 1;
    period = 13'(PER);
    th = 12'd819;    // 0.2
    repeat (5) @(posedge clk);
    rst <= 0;

    run_cycles(5);
    expect_state("healthy", 5'b00000, 1, L);
    amp = 1.5 * AMP;
    step_tc = tc;
    run_cycles(3);
    expect_state("current step up", 5'b00000, 1, L);
    amp = real'(AMP);
    step_tc = tc;
    run_cycles(3);
    expect_state("current step down", 5'b00000, 1, L);

    healthy_seg = 0;
    pm[0] = LOWER;
    run_cycles(4);
    L[0] = LEG_LOWER;
    expect_state("lower switch a", 5'b00001, 2, L);
    pm[1] = UPPER;
    run_cycles(4);
    L[1] = LEG_UPPER;
    expect_state("plus upper switch b", 5'b00011, 3, L);

    pm[0] = OK; pm[1] = OK;
    run_cycles(3);
    L[0] = LEG_OK; L[1] = LEG_OK;
    expect_state("faults cleared", 5'b00000, 1, L);

    pm[0] = OPENPH;
    t0 = tc;
    while (!fs[0] && tc - t0 < TCLK) @(posedge clk);
    det = int'(tc - t0);
    $display("  open-phase detection time: %0d clocks (%0.3f cycle)", det, real'(det) / TCLK);
    checks++;
    if (det >= TCLK / 4) begin failures++; $display("FAIL open phase not detected within T/4"); end
    run_cycles(4);
    L[0] = LEG_OPEN;
    expect_state("open phase a", 5'b00001, 2, L);
    pm[2] = OPENPH;
    run_cycles(4);
    L[2] = LEG_OPEN;
    expect_state("plus open phase c", 5'b00101, 4, L);
    pm[3] = OPENPH;
    run_cycles(3);
    L[3] = LEG_OPEN;
    expect_state("plus open phase d", 5'b01101, 5, L);

    checks++;
    if (n_dbad != 0) begin failures++; $display("FAIL %0d of %0d healthy D values off", n_dbad, n_dchecked); end
    checks++;
    if (n_false != 0) begin failures++; $display("FAIL %0d false-alarm clocks in healthy operation", n_false); end
    checks++;
    if (n_fs_rise != 5) begin failures++; $display("FAIL %0d FS rises, expected 5", n_fs_rise); end
    checks++;
    if (n_late != 0) begin failures++; $display("FAIL %0d samples whose angles came too late", n_late); end
    checks++;
    // 15 kHz out of 2 MHz: 3 samples every 400 clocks
    if (longint'(n_samples) < (tc - 6) * 3 / 400 - 1 || longint'(n_samples) > (tc - 6) * 3 / 400 + 1) begin
      failures++; $display("FAIL %0d samples in %0d clocks", n_samples, tc);
    end
    $display("mechanisms:");
    count("samples at 15 kHz", n_samples);
    count("shared-CORDIC sequences (5 angles)", n_cordic_seq);
    count("healthy D values checked", n_dchecked);
    count("clocks after 50% current steps", n_transient_samples);
    count("clocks with a full moving-average window", n_window_full);
    count("fault-signal rises", n_fs_rise);
    count("leg code 1 (lower switch)", seen_leg[1]);
    count("leg code -1 (upper switch)", seen_leg[2]);
    count("leg code 2 (open phase)", seen_leg[3]);
    for (int m = 1; m <= 5; m++) count($sformatf("mode code %0d", m), seen_mode[m]);
    count("PWM output edges", n_pwm_edges);
    count("spare clock enables", n_aux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
