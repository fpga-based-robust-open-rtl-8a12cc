// Self-checking testbench for fault_code: all 32 fault-signal patterns, in
// random order, against a table written from the phase geometry (neighbours
// a-b, b-c, c-d, d-e, e-a): no fault 1, one fault 2, two neighbours 3, two
// non-neighbours 4, more than two 5. The code appears one clock after FS.
module tb_fault_code;
  import fd_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPH-1:0] fs;
  op_mode_e fc;
  int checks = 0, failures = 0;

  fault_code dut (.clk, .rst, .fs, .fc);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(logic [4:0] f);
    string names [5] = '{"a", "b", "c", "d", "e"};
    int n, p, q;
    n = 0; p = -1; q = -1;
    for (int k = 0; k < 5; k++) if (f[k]) begin n++; if (p < 0) p = k; else q = k; end
    if (n == 0) return 1;
    if (n == 1) return 2;
    if (n > 2) return 5;
    // two faulty phases: adjacent pairs listed explicitly
    if ((p == 0 && q == 1) || (p == 1 && q == 2) || (p == 2 && q == 3) || (p == 3 && q == 4)
        || (p == 0 && q == 4)) return 3;
    return 4;
  endfunction

  initial begin
    fs = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++;
    if (fc != MODE_HEALTHY) begin failures++; $display("FAIL reset code"); end
    for (int n = 0; n < 400; n++) begin
      fs = (n < 32) ? 5'(n) : 5'($urandom);
      @(posedge clk); #1;
      checks++;
      if (int'(fc) != ref_code(fs)) begin
        failures++; $display("FAIL fs=%b fc=%0d expected %0d", fs, fc, ref_code(fs));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
