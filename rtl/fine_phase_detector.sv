// fine_phase_detector: finds the intra-bit phase of the received data in
// each 20-sample window.
//
// Stage 1 (combinational, then registered): transition_counter turns the
// window into five transition counts T_0..T_4. Stage 2: the
// avg_transition_locator turns the registered counts and the previous fine
// phase into the new one-hot fine phase, which is registered and fed back.
// If a window has no transition the previous fine phase is kept. These two
// pipeline registers around the locator follow the published detector; the
// feedback path from the fine-phase register through the locator back to it
// is the one loop that cannot be pipelined and sets the maximum bit rate.
//
// Interface: samples_in is one retimed window per clock (bit 19 earliest).
// fine_phase (one-hot) and samples_out belong to the same window and appear
// two clocks after it entered; samples_out is the window delayed to match,
// for the downsampler. Reset (asynchronous, active low) starts at fine phase
// 0, this design's choice.
module fine_phase_detector
  import cdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  window_t   samples_in,
  output phase_oh_t fine_phase,
  output window_t   samples_out
);

  logic    prev_last_q;
  tcount_t t_cnt [OSR];
  tcount_t t_q   [OSR];
  logic    any_t, any_q;
  window_t win_q;
  phase_oh_t nbar;

  transition_counter u_tc (
    .samples        (samples_in),
    .prev_last      (prev_last_q),
    .t_cnt          (t_cnt),
    .any_transition (any_t)
  );

  // pipeline stage between the transition counter and the locator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_last_q <= 1'b0;
      any_q       <= 1'b0;
      win_q       <= '0;
      samples_out <= '0;
      for (int n = 0; n < OSR; n++) t_q[n] <= '0;
    end else begin
      prev_last_q <= samples_in[0];
      any_q       <= any_t;
      win_q       <= samples_in;
      samples_out <= win_q;
      t_q         <= t_cnt;
    end
  end

  avg_transition_locator u_atl (
    .t_cnt      (t_q),
    .prev_phase (fine_phase),
    .fine_phase (nbar)
  );

  // fine-phase register, the pipeline stage after the locator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fine_phase <= phase_oh_t'(1);
    else if (any_q) fine_phase <= nbar;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(fine_phase));

endmodule
