// Self-checking testbench for phase_mux: a stand-in CORDIC answers each start
// after a random 1..20 clocks. For every sample the testbench checks that
// exactly five starts occur, in phase order a..e, that each start presents the
// (i, i_d) pair of the phase named by 'sel', that 'sel' stays put until the
// matching done, and that the sequencer goes idle afterwards.
module tb_phase_mux;
  import fd_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, cordic_done = 0;
  cur_t i [NPH], i_d [NPH];
  logic cordic_start, busy;
  cur_t cordic_y, cordic_x;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  phase_mux dut (.clk, .rst, .in_valid, .i, .i_d, .cordic_done, .cordic_start, .cordic_y,
                 .cordic_x, .sel, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NPH; k++) begin i[k] = '0; i_d[k] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int s = 0; s < 300; s++) begin
      int starts;
      for (int k = 0; k < NPH; k++) begin i[k] = cur_t'($urandom); i_d[k] = cur_t'($urandom); end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      starts = 0;
      while (starts < NPH) begin
        int wait_n;
        checks++;
        if (!cordic_start) begin failures++; $display("FAIL no start for phase %0d", starts); break; end
        starts++;
        checks += 3;
        if (sel != 3'(starts - 1)) begin failures++; $display("FAIL sel %0d expected %0d", sel, starts - 1); end
        if (cordic_y != i[starts - 1]) begin failures++; $display("FAIL y of phase %0d", starts - 1); end
        if (cordic_x != i_d[starts - 1]) begin failures++; $display("FAIL x of phase %0d", starts - 1); end
        wait_n = 1 + ($urandom % 20);
        for (int w = 0; w < wait_n; w++) begin
          @(posedge clk); #1;
          checks += 2;
          if (cordic_start) begin failures++; $display("FAIL start while waiting"); end
          if (sel != 3'(starts - 1)) begin failures++; $display("FAIL sel moved early"); end
        end
        cordic_done = 1;
        @(posedge clk); #1;
        cordic_done = 0;
      end
      checks++;
      if (busy || cordic_start) begin failures++; $display("FAIL not idle after five phases"); end
      repeat ($urandom % 5) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
