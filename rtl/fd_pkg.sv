// Shared types and constants of the five-phase open-switch fault-diagnosis chain.
//
// Currents are 12-bit two's-complement samples (one ADC register each). Phase
// angles, i.e. the fault-diagnosis index D, use a 16-bit binary-angle format in
// which -32768..32767 covers -pi..pi, so 16384 is pi/2 and adding or
// subtracting angles wraps modulo 2*pi for free. The per-leg fault codes
// (-1 upper switch, 1 lower switch, 2 open phase) and the drive operating-mode
// codes (1 healthy .. 4 two non-adjacent faulty phases) are the numbering the
// method defines; the 3-bit encodings, code 0 for a healthy leg and mode 5 for
// more than two faulty phases are this design's choice.
package fd_pkg;

  localparam int NPH = 5;   // phases a..e
  localparam int IW  = 12;  // current sample width
  localparam int AW  = 16;  // angle width

  typedef logic signed [IW-1:0] cur_t;
  typedef logic signed [AW-1:0] ang_t;

  localparam int ANG_HALF_PI = 1 << (AW - 2);  // pi/2
  localparam int ANG_PI      = 1 << (AW - 1);  // pi (magnitude only)

  // Fault code of one inverter leg.
  typedef enum logic [2:0] {
    LEG_OK    = 3'd0,
    LEG_LOWER = 3'd1,    // lower transistor open
    LEG_OPEN  = 3'd2,    // whole phase open
    LEG_UPPER = 3'b111   // upper transistor open (-1)
  } leg_code_e;

  // Operating mode of the drive, used to reconfigure the controller.
  typedef enum logic [2:0] {
    MODE_HEALTHY     = 3'd1,
    MODE_ONE_FAULT   = 3'd2,
    MODE_TWO_ADJ     = 3'd3,
    MODE_TWO_NONADJ  = 3'd4,
    MODE_UNTOLERABLE = 3'd5
  } op_mode_e;

endpackage
