// Multiplexer: time-shares the single CORDIC among the five phases.
//
// When a new set of (i, i_d) pairs arrives ('in_valid'), the sequencer selects
// phase a, starts the CORDIC, waits for its 'done', selects the next phase and
// so on up to phase e. 'sel' tells the demultiplexer which phase the current
// CORDIC result belongs to and stays stable until that result's 'done'. The
// pairs must be held stable by the source during the sequence (the delay line
// holds them for a whole sample period). Sharing one CORDIC through a
// multiplexer follows the document; the start/done sequencing is this
// design's choice.
//
// Timing: 'cordic_start' one clock after 'in_valid' and one clock after each
// 'cordic_done' but the last; a whole sequence takes about NPH*(ITER+2) clocks.
module phase_mux
  import fd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  cur_t       i   [NPH],
  input  cur_t       i_d [NPH],
  input  logic       cordic_done,
  output logic       cordic_start,
  output cur_t       cordic_y,
  output cur_t       cordic_x,
  output logic [2:0] sel,
  output logic       busy
);

  always_comb begin
    cordic_y = i[sel];
    cordic_x = i_d[sel];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel          <= '0;
      busy         <= 1'b0;
      cordic_start <= 1'b0;
    end else begin
      cordic_start <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          sel          <= '0;
          busy         <= 1'b1;
          cordic_start <= 1'b1;
        end
      end else if (cordic_done) begin
        if (sel == 3'(NPH - 1)) begin
          busy <= 1'b0;
        end else begin
          sel          <= sel + 1'b1;
          cordic_start <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("phase_mux: new sample before all phases were processed");

endmodule
