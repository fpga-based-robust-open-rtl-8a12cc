// Fault_Code: turns the five fault signals into the drive's operating-mode
// code, which the controller uses to switch reference currents, modulation and
// machine model.
//
//   1  healthy                     no FS set
//   2  one faulty phase            one FS set
//   3  two adjacent faulty phases  two FS set on neighbouring legs
//   4  two non-adjacent phases     two FS set otherwise
//   5  not tolerable               three or more FS set
//
// Phases are adjacent in the cyclic order a-b-c-d-e-a. Codes 1..4 follow the
// document; code 5 is this design's choice (the drive tolerates at most two
// faulty phases).
//
// Timing: 'fc' one clock after 'fs'.
module fault_code
  import fd_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic [NPH-1:0] fs,
  output op_mode_e       fc
);

  logic [2:0]     n;
  logic [NPH-1:0] rot;
  logic           adj;

  always_comb begin
    n = '0;
    for (int k = 0; k < NPH; k++) n = n + 3'(fs[k]);
    rot = {fs[0], fs[NPH-1:1]};   // rot[k] = fs[(k+1) mod 5]
    adj = |(fs & rot);
  end

  always_ff @(posedge clk) begin
    if (rst) fc <= MODE_HEALTHY;
    else begin
      unique case (n)
        3'd0:    fc <= MODE_HEALTHY;
        3'd1:    fc <= MODE_ONE_FAULT;
        3'd2:    fc <= adj ? MODE_TWO_ADJ : MODE_TWO_NONADJ;
        default: fc <= MODE_UNTOLERABLE;
      endcase
    end
  end

endmodule
