// Delay: quarter-period delay of each phase current, giving the pair
// (i(t), i(t - T/4)) whose ratio defines the fault-diagnosis index.
//
// Each phase has a circular buffer of PERIOD_MAX/4 samples. On every new sample
// the buffer is written at the write pointer and read floor(period/4) places
// behind it in the same cycle (read before write), so 'i_d' is the sample taken
// exactly period/4 samples earlier. 'period' (samples per fundamental cycle) is
// a run-time input so the delay follows the motor speed; it must lie in
// 4..PERIOD_MAX. Until a quarter period has been stored after reset, 'i_d'
// reads 0 and 'primed' is low, so that the start-up samples, whose ratio
// i/i_d is meaningless, can be kept out of the fault statistics. The
// quarter-period delay follows the document; the buffer, the
// run-time period and PERIOD_MAX are this design's choice.
//
// Timing: 'i_out', 'i_d', 'primed' and 'out_valid' one clock after 'in_valid'.
module delay_line
  import fd_pkg::*;
#(
  parameter  int PERIOD_MAX = 4096,
  localparam int PW    = $clog2(PERIOD_MAX + 1),
  localparam int DEPTH = PERIOD_MAX / 4,
  localparam int DW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [PW-1:0] period,
  input  cur_t          i_in  [NPH],
  output cur_t          i_out [NPH],
  output cur_t          i_d   [NPH],
  output logic          primed,
  output logic          out_valid
);

  cur_t          mem [NPH][DEPTH];
  logic [DW-1:0] wp;
  logic [PW-1:0] fill;      // samples stored, saturating at DEPTH
  logic [PW-1:0] q;
  logic [DW-1:0] ra;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("delay_line: PERIOD_MAX/4 must be a power of two");

  always_comb begin
    q  = period >> 2;
    ra = DW'(PW'(wp) - q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      primed    <= 1'b0;
      for (int k = 0; k < NPH; k++) begin
        i_out[k] <= '0;
        i_d[k]   <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wp <= wp + 1'b1;
        if (fill < PW'(DEPTH)) fill <= fill + 1'b1;
        primed <= (fill >= q);
        for (int k = 0; k < NPH; k++) begin
          i_out[k] <= i_in[k];
          i_d[k]   <= (fill >= q) ? mem[k][ra] : '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int k = 0; k < NPH; k++) mem[k][wp] <= i_in[k];
  end

endmodule
