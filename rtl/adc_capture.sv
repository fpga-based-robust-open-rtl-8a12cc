// ADC: sampling registers for the five phase currents and the rotor angle.
//
// On each sampling enable (clc_1, 15 kHz) the six 12-bit converter codes are
// stored in 12-bit registers and 'valid' pulses for one cycle. Current codes
// are taken as offset binary (mid-scale = 0 A) and stored as two's complement
// by inverting the MSB; the rotor-angle code is stored as it comes. The
// 15 kHz rate and the 12-bit registers follow the document; the parallel
// offset-binary converter interface is this design's choice, since the
// converter itself is outside the FPGA.
//
// Timing: outputs and 'valid' change one clock after 'en'.
module adc_capture
  import fd_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [IW-1:0] code [NPH+1],   // a..e currents, then rotor angle
  output cur_t          i    [NPH],
  output logic [IW-1:0] theta,
  output logic          valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NPH; k++) i[k] <= '0;
      theta <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        for (int k = 0; k < NPH; k++) i[k] <= cur_t'({~code[k][IW-1], code[k][IW-2:0]});
        theta <= code[NPH];
      end
    end
  end

endmodule
