// Self-checking testbench for cordic_atan2: random and corner-case vectors
// (axes, all four quadrants, full-scale, tiny and zero) are compared with the
// real-valued $atan2 converted to binary-angle units (32768 = pi), modulo 2*pi.
// Allowed error: 6 units (0.033 degrees) for vectors of length 64 LSB or more,
// 40 units for shorter ones; (0,0) must give 0. The result must arrive exactly
// ITER clocks after the clock that samples 'start'.
module tb_cordic_atan2;
  import fd_pkg::*;
  localparam int ITER = 15;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, start = 0;
  cur_t y, x;
  ang_t angle;
  logic done;
  int checks = 0, failures = 0;

  cordic_atan2 #(.ITER(ITER)) dut (.clk, .rst, .start, .y, .x, .angle, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int yy, input int xx);
    int lat, err, expv, tol;
    real len;
    y = cur_t'(yy); x = cur_t'(xx);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 0;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != ITER) begin failures++; $display("FAIL latency %0d", lat); end
    len = $sqrt(real'(xx) * xx + real'(yy) * yy);
    if (xx == 0 && yy == 0) expv = 0;
    else expv = int'($atan2(real'(yy), real'(xx)) / PI * 32768.0);
    err = int'(angle) - expv;
    while (err > 32768) err -= 65536;
    while (err < -32768) err += 65536;
    if (err < 0) err = -err;
    tol = (len >= 64.0) ? 6 : ((xx == 0 && yy == 0) ? 0 : 40);
    checks++;
    if (err > tol) begin
      failures++;
      if (failures < 20) $display("FAIL atan2(%0d,%0d) = %0d expected %0d", yy, xx, angle, expv);
    end
  endtask

  initial begin
    y = '0; x = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    run(0, 0);
    run(0, 1000);  run(1000, 0);  run(0, -1000);  run(-1000, 0);
    run(2047, 2047); run(-2048, -2048); run(2047, -2048); run(-2048, 2047);
    run(0, -2048); run(-2048, 0); run(5, -7); run(-1, -1);
    for (int n = 0; n < 4000; n++) begin
      int yy, xx;
      yy = int'($urandom % 4096) - 2048;
      xx = int'($urandom % 4096) - 2048;
      if (n % 4 == 0) begin yy = yy / 64; xx = xx / 64; end
      run(yy, xx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
