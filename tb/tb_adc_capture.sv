// Self-checking testbench for adc_capture: random converter codes are applied
// every clock and the enable is pulsed at random; after each enable the
// registers must hold the codes of that clock (currents converted from
// offset binary to two's complement, i.e. code - 2048) and 'valid' must pulse
// exactly one clock after 'en'. Between enables the registers must not move.
module tb_adc_capture;
  import fd_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [IW-1:0] code [NPH+1];
  cur_t i [NPH];
  logic [IW-1:0] theta;
  logic valid;
  int checks = 0, failures = 0;

  adc_capture dut (.clk, .rst, .en, .code, .i, .theta, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_i [NPH];
  int exp_t;
  logic en_d;
  initial begin
    for (int k = 0; k <= NPH; k++) code[k] = '0;
    exp_t = 0; en_d = 0;
    for (int k = 0; k < NPH; k++) exp_i[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      // drive new inputs before the edge
      for (int k = 0; k <= NPH; k++) code[k] = IW'($urandom);
      en = ($urandom % 4) == 0;
      if (en) begin
        for (int k = 0; k < NPH; k++) exp_i[k] = int'(code[k]) - 2048;
        exp_t = int'(code[NPH]);
      end
      en_d = en;
      @(posedge clk); #1;
      checks++;
      if (valid !== en_d) begin failures++; $display("FAIL valid %0b, en was %0b", valid, en_d); end
      for (int k = 0; k < NPH; k++) begin
        checks++;
        if (int'(i[k]) != exp_i[k]) begin
          failures++; $display("FAIL phase %0d: %0d expected %0d", k, i[k], exp_i[k]);
        end
      end
      checks++;
      if (int'(theta) != exp_t) begin failures++; $display("FAIL theta %0d expected %0d", theta, exp_t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
