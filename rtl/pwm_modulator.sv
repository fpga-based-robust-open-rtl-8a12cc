// PWM_Modulator: five PWM channels that let the FD index of each phase be
// watched on an oscilloscope after a simple LC filter.
//
// An 8-bit counter advances on each 'tick' (clc_2). Each channel's duty is the
// top RES bits of its angle in offset binary, so -pi gives 0 % and +pi almost
// 100 %; duties are reloaded when the counter wraps, so a pulse is never cut
// short by an update. Output pu[k] is high while counter < duty. A PWM block
// for analog viewing follows the document; resolution and mapping are this
// design's choice.
//
// Timing: carrier period 2^RES ticks; a new angle appears at the next wrap.
module pwm_modulator
  import fd_pkg::*;
#(
  parameter int RES = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           tick,
  input  ang_t           d [NPH],
  output logic [NPH-1:0] pu
);

  logic [RES-1:0] cnt;
  logic [RES-1:0] duty [NPH];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      pu  <= '0;
      for (int k = 0; k < NPH; k++) duty[k] <= '0;
    end else if (tick) begin
      cnt <= cnt + 1'b1;
      if (cnt == '1)
        for (int k = 0; k < NPH; k++) duty[k] <= {~d[k][AW-1], d[k][AW-2 -: RES-1]};
      for (int k = 0; k < NPH; k++) pu[k] <= (cnt < duty[k]);
    end
  end

endmodule
