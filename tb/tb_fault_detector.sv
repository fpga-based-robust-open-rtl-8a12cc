// Self-checking testbench for fault_detector: angles (random, and swept near
// 0, +-pi/2 and +-pi) are converted to radians in real arithmetic; y must be 1
// exactly when |D| lies within ANG_TOL*pi/32768 of 0, pi/2 or pi, and always
// 0 while 'arm' is low.
module tb_fault_detector;
  import fd_pkg::*;
  localparam int TOL = 256;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, in_valid = 0, arm = 1;
  ang_t d [NPH];
  logic [NPH-1:0] y;
  logic out_valid;
  int checks = 0, failures = 0;

  fault_detector #(.ANG_TOL(TOL)) dut (.clk, .rst, .in_valid, .arm, .d, .y, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic logic ref_y(int a);
    real r, t;
    r = (a < 0 ? -real'(a) : real'(a)) * PI / 32768.0;
    t = real'(TOL) * PI / 32768.0 + 1e-9;
    return (r <= t) || (absr(r - PI / 2) <= t) || (absr(r - PI) <= t);
  endfunction

  int centers [5] = '{0, 16384, -16384, 32767, -32768};
  initial begin
    int hits;
    hits = 0;
    for (int k = 0; k < NPH; k++) d[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 6000; n++) begin
      for (int k = 0; k < NPH; k++) begin
        if (n % 2 == 0) d[k] = ang_t'($urandom);
        else d[k] = ang_t'(centers[$urandom % 5] + int'($urandom % 601) - 300);
      end
      arm = (n % 10) != 3;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      for (int k = 0; k < NPH; k++) begin
        checks++;
        if (y[k]) hits++;
        if (y[k] != (arm && ref_y(int'(d[k])))) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d y=%0b", d[k], y[k]);
        end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no fault sample seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
