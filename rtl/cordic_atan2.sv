// Cordic_Algorithm: four-quadrant inverse tangent D = atan2(y, x) of one
// (i(t), i(t - T/4)) pair, by an iterative vectoring-mode CORDIC.
//
// On 'start' the inputs are captured, scaled up by 2^8 and pre-rotated by
// +-90 degrees into the right half plane (the rotation is credited to the
// angle accumulator). Each of the ITER following clocks performs one
// micro-rotation by +-atan(2^-k) that drives y towards zero, summing the
// rotations in the angle register. The result is a 16-bit binary angle
// (32768 = pi) over -pi..pi; the modular angle arithmetic wraps +pi to -pi.
// The vector (0, 0), i.e. a phase with no current, gives angle 0, the value
// the method expects for an open phase. The four-quadrant inverse tangent by
// CORDIC follows the document; the iteration count, word widths and the zero
// case are this design's choice.
//
// Timing: 'done' pulses ITER+1 clocks after 'start'; 'angle' is then valid and
// held until the next result. A 'start' while busy is a protocol error.
module cordic_atan2
  import fd_pkg::*;
#(
  parameter int ITER = 15
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  cur_t y,
  input  cur_t x,
  output ang_t angle,
  output logic done
);

  localparam int GUARD = 8;
  localparam int XW    = IW + GUARD + 2;  // room for sqrt(2) and the CORDIC gain 1.647
  localparam int CW    = $clog2(ITER + 1);

  // atan(2^-k) in binary-angle units: round(atan(2^-k) / pi * 2^15).
  localparam ang_t ATAN_TAB [16] = '{
    16'sd8192, 16'sd4836, 16'sd2555, 16'sd1297, 16'sd651, 16'sd326, 16'sd163, 16'sd81,
    16'sd41,   16'sd20,   16'sd10,   16'sd5,    16'sd3,   16'sd1,   16'sd1,   16'sd0
  };

  initial assert (ITER >= 1 && ITER <= 16) else $error("cordic_atan2: ITER must be 1..16");

  typedef logic signed [XW-1:0] vec_t;

  vec_t          xr, yr, xs, ys;
  ang_t          z;
  logic [CW-1:0] k;
  logic          busy;
  logic          zero;

  vec_t xin, yin;
  always_comb begin
    xin = vec_t'(x) <<< GUARD;
    yin = vec_t'(y) <<< GUARD;
    xs  = xr >>> k;
    ys  = yr >>> k;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      k     <= '0;
      xr    <= '0;
      yr    <= '0;
      z     <= '0;
      zero  <= 1'b0;
      angle <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        k    <= '0;
        zero <= (x == '0) && (y == '0);
        if (x >= 0) begin
          xr <= xin;   yr <= yin;   z <= '0;
        end else if (y >= 0) begin           // rotate by -90 degrees
          xr <= yin;   yr <= -xin;  z <= ang_t'(ANG_HALF_PI);
        end else begin                       // rotate by +90 degrees
          xr <= -yin;  yr <= xin;   z <= -ang_t'(ANG_HALF_PI);
        end
      end else if (busy) begin
        if (yr >= 0) begin
          xr <= xr + ys;  yr <= yr - xs;  z <= z + ATAN_TAB[k];
        end else begin
          xr <= xr - ys;  yr <= yr + xs;  z <= z - ATAN_TAB[k];
        end
        k <= k + 1'b1;
        if (k == CW'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          angle <= zero ? '0 : ((yr >= 0) ? z + ATAN_TAB[k] : z - ATAN_TAB[k]);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("cordic_atan2: start while busy");

endmodule
