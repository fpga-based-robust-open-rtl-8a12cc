// Demultiplexer: returns each CORDIC result to the angle register of its phase.
//
// On every CORDIC 'done' the angle is written into theta[sel]; after the last
// phase (e) 'out_valid' pulses to tell the fault detector that a complete set
// of five FD indices D is ready. The registers hold their values between
// updates, so the PWM outputs can read them at any time. The demultiplexer
// follows the document; the handshake is this design's choice.
//
// Timing: theta[sel] and 'out_valid' one clock after 'in_valid'.
module phase_demux
  import fd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [2:0] sel,
  input  ang_t       angle,
  output ang_t       theta [NPH],
  output logic       out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NPH; k++) theta[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (sel == 3'(NPH - 1));
      if (in_valid)
        for (int k = 0; k < NPH; k++)
          if (sel == 3'(k)) theta[k] <= angle;
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> sel < 3'(NPH))
    else $error("phase_demux: phase index out of range");

endmodule
