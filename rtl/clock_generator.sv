// Clock_Generator: derives the slow "custom clocks" of the diagnosis chain from
// the 2 MHz system clock.
//
// Each output clc[k] is a one-cycle clock enable at RATE_HZ[k] on average,
// rather than a divided clock, so the whole chain stays in one clock domain.
// A fractional accumulator adds RATE_HZ[k] every cycle and fires when it
// passes CLK_HZ, which keeps non-integer ratios exact on average: the 15 kHz
// sampling rate is 2 MHz / 133.33, so clc[0] comes every 133 or 134 cycles.
// The 15 kHz sampling rate and the 2 MHz clock follow the document; the use of
// enables and the other three rates (PWM counter tick, two spares) are this
// design's choice. Synchronous active-high reset.
module clock_generator #(
  parameter int unsigned CLK_HZ = 2_000_000,
  parameter int unsigned NOUT   = 4,
  parameter int unsigned RATE_HZ [NOUT] = '{15_000, 1_000_000, 1_000, 100}
) (
  input  logic            clk,
  input  logic            rst,
  output logic [NOUT-1:0] clc
);

  for (genvar k = 0; k < NOUT; k++) begin : g_out
    logic [31:0] acc;
    logic [32:0] nxt;

    initial assert (RATE_HZ[k] > 0 && RATE_HZ[k] <= CLK_HZ)
      else $error("clock_generator: rate %0d out of range", RATE_HZ[k]);

    always_comb nxt = {1'b0, acc} + 33'(RATE_HZ[k]);

    always_ff @(posedge clk) begin
      if (rst) begin
        acc    <= '0;
        clc[k] <= 1'b0;
      end else if (nxt >= 33'(CLK_HZ)) begin
        acc    <= 32'(nxt - 33'(CLK_HZ));
        clc[k] <= 1'b1;
      end else begin
        acc    <= nxt[31:0];
        clc[k] <= 1'b0;
      end
    end
  end

endmodule
