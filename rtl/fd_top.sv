// Five-phase open-transistor fault diagnosis: the complete FPGA chain.
//
//   ADC -> Delay (T/4) -> Multiplexer -> CORDIC atan2 -> Demultiplexer
//       -> Fault_Detector -> Moving_Average -> Comparator(TH) -> FS
//       -> Fault_Code (operating mode)      and  -> fault localization
//   Demultiplexer -> PWM_Modulator (analog image of D)
//   Clock_Generator: clc_1 = 15 kHz sampling, clc_2 = PWM tick, clc_3/4 spare
//
// Every 15 kHz sample, the five phase currents are captured, each is paired
// with its own value a quarter of a fundamental period earlier, and one shared
// CORDIC computes D = atan2(i(t), i(t-T/4)) for the five phases in turn. A
// healthy phase makes D ramp steadily through -pi..pi; a phase that conducts
// only half the time (one open transistor) or not at all (open phase) pins D
// to 0, +-pi/2 or +-pi. The share x of such samples over the last cycle is
// compared with TH to raise the phase's fault signal FS. The localization
// then tells upper transistor, lower transistor or whole phase from the
// current's polarity and the mean of D, and the count and adjacency of faulty
// phases give the drive's operating-mode code.
//
// Interface: 'clk' is the 2 MHz clock from the device PLL; 'adc_code' are the
// six 12-bit converter codes (currents a..e in offset binary, rotor angle);
// 'period' is the fundamental period in samples (4..PERIOD_MAX) and 'th' the
// 12-bit threshold (4096 = 1). Synchronous active-high reset.
// Timing: the five D values of a sample are ready about 88 clocks after its
// sampling enable (133.3 clocks apart); FS follows 3 clocks later, the mode
// code 1 clock after FS.
// The chain of blocks follows the document; the run-time period input, the
// fixed-point formats, tolerances and handshakes are this design's choices.
module fd_top
  import fd_pkg::*;
#(
  parameter  int unsigned CLK_HZ    = 2_000_000,
  parameter  int unsigned SAMPLE_HZ = 15_000,
  parameter  int PERIOD_MAX = 4096,
  parameter  int I_ZERO_TH  = 26,
  parameter  int ANG_TOL    = 256,
  parameter  int D_EPS      = 512,
  parameter  int CORDIC_ITER = 15,
  localparam int PW = $clog2(PERIOD_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [IW-1:0]  adc_code [NPH+1],
  input  logic [PW-1:0]  period,
  input  logic [11:0]    th,
  output logic [NPH-1:0] fs,
  output leg_code_e      leg_code [NPH],
  output op_mode_e       fc,
  output ang_t           d [NPH],
  output logic [NPH-1:0] pu,
  output logic [IW-1:0]  theta,
  output logic [1:0]     clc_aux
);

  localparam int unsigned RATES [4] = '{SAMPLE_HZ, 1_000_000, 1_000, 100};

  logic [3:0] clc;
  clock_generator #(.CLK_HZ(CLK_HZ), .NOUT(4), .RATE_HZ(RATES)) u_clkgen (
    .clk, .rst, .clc
  );
  assign clc_aux = clc[3:2];

  cur_t i_s [NPH];
  logic s_valid;
  adc_capture u_adc (
    .clk, .rst, .en(clc[0]), .code(adc_code), .i(i_s), .theta, .valid(s_valid)
  );

  cur_t i_now [NPH], i_old [NPH];
  logic p_valid, primed;
  delay_line #(.PERIOD_MAX(PERIOD_MAX)) u_delay (
    .clk, .rst, .in_valid(s_valid), .period, .i_in(i_s), .i_out(i_now), .i_d(i_old),
    .primed, .out_valid(p_valid)
  );

  logic       c_start, c_done;
  cur_t       c_y, c_x;
  ang_t       c_ang;
  logic [2:0] sel;
  phase_mux u_mux (
    .clk, .rst, .in_valid(p_valid), .i(i_now), .i_d(i_old), .cordic_done(c_done),
    .cordic_start(c_start), .cordic_y(c_y), .cordic_x(c_x), .sel, .busy()
  );

  cordic_atan2 #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst, .start(c_start), .y(c_y), .x(c_x), .angle(c_ang), .done(c_done)
  );

  logic d_valid;
  phase_demux u_demux (
    .clk, .rst, .in_valid(c_done), .sel, .angle(c_ang), .theta(d), .out_valid(d_valid)
  );

  logic [NPH-1:0] y;
  logic           y_valid;
  fault_detector #(.ANG_TOL(ANG_TOL)) u_det (
    .clk, .rst, .in_valid(d_valid), .arm(primed), .d, .y, .out_valid(y_valid)
  );

  logic [PW-1:0] x_cnt [NPH];
  logic          x_valid;
  moving_average #(.PERIOD_MAX(PERIOD_MAX)) u_avg (
    .clk, .rst, .in_valid(y_valid), .period, .y, .x_cnt, .out_valid(x_valid)
  );

  comparator #(.PERIOD_MAX(PERIOD_MAX), .TH_W(12)) u_cmp (
    .clk, .rst, .in_valid(x_valid), .x_cnt, .period, .th, .fs, .out_valid()
  );

  // Localization judges each sample's current and D against the FS of the
  // previous sample, which is what is available when D arrives.
  fault_localizer #(.PERIOD_MAX(PERIOD_MAX), .I_ZERO_TH(I_ZERO_TH), .D_EPS(D_EPS)) u_loc (
    .clk, .rst, .in_valid(d_valid), .period, .fs, .i(i_now), .d, .leg_code
  );

  fault_code u_code (.clk, .rst, .fs, .fc);

  pwm_modulator #(.RES(8)) u_pwm (.clk, .rst, .tick(clc[1]), .d, .pu);

endmodule
