// Moving_Average: share of fault samples over the last fundamental cycle.
//
// For each phase the module keeps a running count C of fault samples (modulo
// 2^PW) and stores it after every sample in a circular buffer of PERIOD_MAX
// entries. The number of fault samples among the last 'period' samples is
// C(n) - C(n - period), which stays exact when 'period' changes with the motor
// speed. The output x_cnt is this count, i.e. x * period; the division by the
// period is left to the comparator, which compares against TH * period.
// Before 'period' samples have been seen, the window holds only the samples
// since reset. Averaging over one fundamental cycle follows the document; the
// running-count buffer and the run-time period are this design's choice.
// 'period' must lie in 1..PERIOD_MAX; PERIOD_MAX must be a power of two.
//
// Timing: 'x_cnt' and 'out_valid' one clock after 'in_valid'.
module moving_average
  import fd_pkg::*;
#(
  parameter  int PERIOD_MAX = 4096,
  localparam int PW = $clog2(PERIOD_MAX + 1),
  localparam int BW = $clog2(PERIOD_MAX)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [PW-1:0]  period,
  input  logic [NPH-1:0] y,
  output logic [PW-1:0]  x_cnt [NPH],
  output logic           out_valid
);

  logic [PW-1:0] mem [NPH][PERIOD_MAX];
  logic [PW-1:0] cnt [NPH];      // running count C(n-1)
  logic [PW-1:0] cnew [NPH];     // C(n)
  logic [BW-1:0] wp;
  logic [PW-1:0] fill;           // samples stored, saturating at PERIOD_MAX
  logic [BW-1:0] ra;

  initial assert ((PERIOD_MAX & (PERIOD_MAX - 1)) == 0)
    else $error("moving_average: PERIOD_MAX must be a power of two");

  always_comb begin
    ra = BW'(wp - BW'(period));
    for (int k = 0; k < NPH; k++) cnew[k] = cnt[k] + PW'(y[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < NPH; k++) begin
        cnt[k]   <= '0;
        x_cnt[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wp <= wp + 1'b1;
        if (fill < PW'(PERIOD_MAX)) fill <= fill + 1'b1;
        for (int k = 0; k < NPH; k++) begin
          cnt[k]   <= cnew[k];
          // C(n - period) is the count before the window; C = 0 before reset.
          x_cnt[k] <= (fill >= period) ? cnew[k] - mem[k][ra] : cnew[k];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int k = 0; k < NPH; k++) mem[k][wp] <= cnew[k];
  end

endmodule
