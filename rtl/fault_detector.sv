// Fault_Detector: marks the samples whose FD index points to a fault.
//
// For each phase, y = 1 when |D| equals 0, pi/2 or pi, the only values the
// index takes while a phase carries no current for part of the cycle, and
// y = 0 otherwise. A healthy phase makes D sweep linearly through -pi..pi, so
// it meets these points only briefly. Equality is tested within +-ANG_TOL
// binary-angle units to allow for measurement noise and CORDIC error; the
// three target values follow the document, the tolerance is this design's
// choice. While 'arm' is low (the delay line has not yet produced a real
// quarter-period-old sample) y stays 0; this start-up guard is also this
// design's choice.
//
// Timing: 'y' and 'out_valid' one clock after 'in_valid'.
module fault_detector
  import fd_pkg::*;
#(
  parameter int ANG_TOL = 256
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic           arm,
  input  ang_t           d [NPH],
  output logic [NPH-1:0] y,
  output logic           out_valid
);

  logic [AW:0] mag [NPH];   // |D|, 0..ANG_PI
  logic [NPH-1:0] hit;

  always_comb begin
    for (int k = 0; k < NPH; k++) begin
      mag[k] = d[k][AW-1] ? (AW+1)'(-$signed({d[k][AW-1], d[k]})) : (AW+1)'(d[k]);
      hit[k] = (mag[k] <= (AW+1)'(ANG_TOL))
            || ((mag[k] + (AW+1)'(ANG_TOL) >= (AW+1)'(ANG_HALF_PI))
                && (mag[k] <= (AW+1)'(ANG_HALF_PI + ANG_TOL)))
            || (mag[k] + (AW+1)'(ANG_TOL) >= (AW+1)'(ANG_PI));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= arm ? hit : '0;
    end
  end

endmodule
