// Self-checking testbench for comparator: random window counts, periods and
// thresholds, plus the boundary x = TH exactly; FS must be 1 exactly when the
// real-valued average x_cnt/period is above TH/4096.
module tb_comparator;
  import fd_pkg::*;
  localparam int PMAX = 1024;
  localparam int PW = $clog2(PMAX + 1);
  logic clk = 0, rst = 1, in_valid = 0;
  logic [PW-1:0] x_cnt [NPH];
  logic [PW-1:0] period;
  logic [11:0] th;
  logic [NPH-1:0] fs;
  logic out_valid;
  int checks = 0, failures = 0;

  comparator #(.PERIOD_MAX(PMAX)) dut (.clk, .rst, .in_valid, .x_cnt, .period, .th, .fs, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    ones = 0;
    for (int k = 0; k < NPH; k++) x_cnt[k] = '0;
    period = PW'(100); th = 12'd2048;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      period = PW'(1 + $urandom % PMAX);
      th = 12'($urandom);
      for (int k = 0; k < NPH; k++) begin
        x_cnt[k] = PW'($urandom % (int'(period) + 1));
        if (k == 0 && n % 7 == 0) begin   // exact boundary: x = TH
          period = PW'(512); th = 12'(2 * int'(x_cnt[0] % 512));
          x_cnt[0] = PW'(th / 8);
        end
      end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      for (int k = 0; k < NPH; k++) begin
        logic e;
        e = (real'(x_cnt[k]) / real'(period)) > (real'(th) / 4096.0);
        checks++;
        if (fs[k]) ones++;
        if (fs[k] != e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d N=%0d TH=%0d fs=%0b", x_cnt[k], period, th, fs[k]);
        end
      end
    end
    checks++;
    if (ones == 0) begin failures++; $display("FAIL FS never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
