// Self-checking testbench for phase_demux: random angles are delivered with a
// random phase index; each must land in its own register only, the other
// registers must keep their values, and 'out_valid' must pulse exactly once,
// one clock after the result for phase e.
module tb_phase_demux;
  import fd_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [2:0] sel;
  ang_t angle;
  ang_t theta [NPH];
  logic out_valid;
  int checks = 0, failures = 0;

  phase_demux dut (.clk, .rst, .in_valid, .sel, .angle, .theta, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_t [NPH];
  initial begin
    sel = '0; angle = '0;
    for (int k = 0; k < NPH; k++) exp_t[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      logic v;
      v = ($urandom % 3) != 0;
      in_valid = v;
      sel = 3'($urandom % NPH);
      angle = ang_t'($urandom);
      if (v) exp_t[sel] = int'(angle);
      @(posedge clk); #1;
      checks++;
      if (out_valid != (v && sel == 3'(NPH - 1))) begin
        failures++; $display("FAIL out_valid %0b (v=%0b sel=%0d)", out_valid, v, sel);
      end
      for (int k = 0; k < NPH; k++) begin
        checks++;
        if (int'(theta[k]) != exp_t[k]) begin failures++; $display("FAIL theta[%0d]", k); end
      end
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
