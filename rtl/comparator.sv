// Comparator: raises the fault signal FS of a phase when the averaged fault
// index x exceeds the threshold TH.
//
// TH is a 12-bit fraction (4096 = 1, so 2048 = 0.5). Since the moving average
// delivers x * period as a count, the test x > TH is made without a divider as
// x_cnt * 4096 > TH * period. FS follows x and is not latched. The 12-bit TH
// register and the comparison follow the document; the fixed-point format is
// this design's choice.
//
// Timing: 'fs' and 'out_valid' one clock after 'in_valid'.
module comparator
  import fd_pkg::*;
#(
  parameter  int PERIOD_MAX = 4096,
  parameter  int TH_W = 12,
  localparam int PW = $clog2(PERIOD_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [PW-1:0]  x_cnt [NPH],
  input  logic [PW-1:0]  period,
  input  logic [TH_W-1:0] th,
  output logic [NPH-1:0] fs,
  output logic           out_valid
);

  logic [PW+TH_W-1:0] lim;
  always_comb lim = (PW+TH_W)'(th) * (PW+TH_W)'(period);

  always_ff @(posedge clk) begin
    if (rst) begin
      fs        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < NPH; k++) fs[k] <= {x_cnt[k], TH_W'(0)} > lim;
    end
  end

endmodule
