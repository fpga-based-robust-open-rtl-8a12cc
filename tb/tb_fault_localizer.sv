// Self-checking testbench for fault_localizer (PERIOD_MAX = 64, period 40):
// in each episode every phase gets a random fault signal and a random kind of
// current (mostly positive, mostly negative, zero with D near 0, balanced with
// random D, and exactly half positive as a boundary case). A reference model
// in real arithmetic averages S(i) and D over each cycle counted from the rise
// of FS and applies the document's rules (mean S > 0.5 lower, < -0.5 upper,
// else |mean D| < eps open, else unchanged; FS low gives 0). The leg codes
// are compared after every sample.
module tb_fault_localizer;
  import fd_pkg::*;
  localparam int PMAX = 64;
  localparam int PW = $clog2(PMAX + 1);
  localparam int N = 40;
  localparam int ITH = 26;
  localparam int EPS = 512;

  logic clk = 0, rst = 1, in_valid = 0;
  logic [PW-1:0] period;
  logic [NPH-1:0] fs;
  cur_t i [NPH];
  ang_t d [NPH];
  leg_code_e leg_code [NPH];
  int checks = 0, failures = 0;

  fault_localizer #(.PERIOD_MAX(PMAX), .I_ZERO_TH(ITH), .D_EPS(EPS)) dut (
    .clk, .rst, .in_valid, .period, .fs, .i, .d, .leg_code);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  kind [NPH];
  int  cnt [NPH];
  real s_acc [NPH], d_acc [NPH];
  int  ref_code [NPH];
  int  seen [4];   // codes 0, 1, -1, 2 observed

  function automatic int code_int(leg_code_e c);
    case (c)
      LEG_OK:    return 0;
      LEG_LOWER: return 1;
      LEG_UPPER: return -1;
      LEG_OPEN:  return 2;
      default:   return 99;
    endcase
  endfunction

  initial begin
    seen = '{0, 0, 0, 0};
    period = PW'(N);
    fs = '0;
    for (int k = 0; k < NPH; k++) begin
      i[k] = '0; d[k] = '0; cnt[k] = 0; s_acc[k] = 0; d_acc[k] = 0; ref_code[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int ep = 0; ep < 120; ep++) begin
      logic [NPH-1:0] f;
      f = NPH'($urandom);
      for (int k = 0; k < NPH; k++) kind[k] = $urandom % 5;
      for (int n = 0; n < 3 * N + 7; n++) begin
        fs = (n < 3 * N) ? f : '0;
        for (int k = 0; k < NPH; k++) begin
          int pos;
          pos = n % N;
          case (kind[k])
            0: i[k] = cur_t'((pos < 26) ? 100 + $urandom % 500 : int'($urandom % 20) - 10);
            1: i[k] = cur_t'((pos < 26) ? -100 - int'($urandom % 500) : int'($urandom % 20) - 10);
            2: i[k] = cur_t'(int'($urandom % 51) - 25);
            3: i[k] = cur_t'((pos < 20) ? 300 : -300);
            default: i[k] = cur_t'((pos < 20) ? 300 : int'($urandom % 51) - 25);
          endcase
          d[k] = (kind[k] == 2) ? ang_t'(int'($urandom % 201) - 100) : ang_t'($urandom);
        end
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        // reference model
        for (int k = 0; k < NPH; k++) begin
          real sw;
          if (!fs[k]) begin
            cnt[k] = 0; s_acc[k] = 0; d_acc[k] = 0; ref_code[k] = 0;
          end else begin
            sw = (int'(i[k]) >= ITH) ? 1.0 : ((int'(i[k]) <= -ITH) ? -1.0 : 0.0);
            s_acc[k] += sw; d_acc[k] += real'(d[k]); cnt[k]++;
            if (cnt[k] == N) begin
              real ms, md;
              ms = s_acc[k] / N; md = d_acc[k] / N;
              if (ms > 0.5) ref_code[k] = 1;
              else if (ms < -0.5) ref_code[k] = -1;
              else if ((md < 0 ? -md : md) < real'(EPS)) ref_code[k] = 2;
              cnt[k] = 0; s_acc[k] = 0; d_acc[k] = 0;
            end
          end
          checks++;
          if (code_int(leg_code[k]) != ref_code[k]) begin
            failures++;
            if (failures < 10) $display("FAIL ep=%0d n=%0d ph=%0d kind=%0d code=%0d expected %0d",
                                        ep, n, k, kind[k], code_int(leg_code[k]), ref_code[k]);
          end
          case (ref_code[k]) 0: seen[0]++; 1: seen[1]++; -1: seen[2]++; 2: seen[3]++; default: ; endcase
        end
        repeat ($urandom % 3) @(posedge clk);
        #1;
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL code class %0d never produced", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
