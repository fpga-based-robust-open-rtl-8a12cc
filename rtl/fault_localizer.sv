// Fault localization: names the faulty device of each leg once its fault
// signal FS is set.
//
// Per phase, while FS is high, every sample adds the current's polarity
// S(i) (+1 for i >= I_ZERO_TH, -1 for i <= -I_ZERO_TH, 0 in between) and the FD
// index D to two accumulators. At the end of each fundamental cycle
// ('period' samples, counted from the rise of FS) the sums are judged and
// cleared:
//   mean S >  0.5             -> lower transistor open  (code  1)
//   mean S < -0.5             -> upper transistor open  (code -1)
//   otherwise |mean D| < eps  -> whole phase open       (code  2)
//   otherwise                 -> keep the previous code
// The means are never divided out: the tests are 2*sum(S) > period,
// 2*sum(S) < -period and |sum(D)| < D_EPS*period. When FS falls, the leg
// returns to code 0. The weighting function, the +-0.5 limits and the mean-D
// test follow the document; integrate-and-dump averaging, the 0.1 A limit in
// LSBs (1/256 A per LSB assumed) and D_EPS are this design's choice.
//
// Timing: 'leg_code' changes one clock after the 'in_valid' that ends a cycle.
module fault_localizer
  import fd_pkg::*;
#(
  parameter  int PERIOD_MAX = 4096,
  parameter  int I_ZERO_TH  = 26,
  parameter  int D_EPS      = 512,
  localparam int PW = $clog2(PERIOD_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [PW-1:0]  period,
  input  logic [NPH-1:0] fs,
  input  cur_t           i [NPH],
  input  ang_t           d [NPH],
  output leg_code_e      leg_code [NPH]
);

  localparam int SW = PW + 2;        // |sum S| <= PERIOD_MAX, plus sign and doubling
  localparam int DW = AW + PW + 1;   // |sum D| <= 2^15 * PERIOD_MAX
  localparam int EW = DW + 8;        // width of D_EPS * period

  typedef logic signed [SW-1:0] ssum_t;
  typedef logic signed [DW-1:0] dsum_t;

  logic [PW-1:0] n    [NPH];
  ssum_t         ssum [NPH];
  dsum_t         dsum [NPH];

  ssum_t s_w [NPH];
  ssum_t s_t [NPH];
  dsum_t d_t [NPH];
  dsum_t d_a [NPH];
  logic signed [EW-1:0] d_lim;
  ssum_t per_s;

  always_comb begin
    per_s = ssum_t'(period);
    d_lim = EW'(D_EPS) * EW'(period);
    for (int k = 0; k < NPH; k++) begin
      if (i[k] >= cur_t'(I_ZERO_TH))       s_w[k] = ssum_t'(1);
      else if (i[k] <= -cur_t'(I_ZERO_TH)) s_w[k] = -ssum_t'(1);
      else                                 s_w[k] = '0;
      s_t[k] = ssum[k] + s_w[k];
      d_t[k] = dsum[k] + dsum_t'(d[k]);
      d_a[k] = d_t[k][DW-1] ? -d_t[k] : d_t[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NPH; k++) begin
        n[k]        <= '0;
        ssum[k]     <= '0;
        dsum[k]     <= '0;
        leg_code[k] <= LEG_OK;
      end
    end else if (in_valid) begin
      for (int k = 0; k < NPH; k++) begin
        if (!fs[k]) begin
          n[k]        <= '0;
          ssum[k]     <= '0;
          dsum[k]     <= '0;
          leg_code[k] <= LEG_OK;
        end else if (n[k] + 1'b1 >= period) begin
          n[k]    <= '0;
          ssum[k] <= '0;
          dsum[k] <= '0;
          if ((s_t[k] <<< 1) > per_s)                   leg_code[k] <= LEG_LOWER;
          else if ((s_t[k] <<< 1) < -per_s)             leg_code[k] <= LEG_UPPER;
          else if (EW'(d_a[k]) < d_lim)                 leg_code[k] <= LEG_OPEN;
        end else begin
          n[k]    <= n[k] + 1'b1;
          ssum[k] <= s_t[k];
          dsum[k] <= d_t[k];
        end
      end
    end
  end

endmodule
