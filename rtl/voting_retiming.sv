// voting_retiming: 2/3 majority sample voting and retiming of one 20-sample
// window per clock.
//
// Each output sample is the majority of the three-sample window centred on
// it, so an isolated flipped sample next to a data edge ("00010111" becomes
// "00001111") no longer creates extra transitions for the fine-phase
// detector. The voter for the first sample of a window needs the last sample
// of the previous window, and the voter for the last sample needs the first
// sample of the next window; the raw window is therefore held one cycle so
// that both neighbours exist. The voted (or, with vote_en low, the raw)
// window is then registered on the single core clock.
//
// Interface: samples_in is one window per cycle, bit 19 earliest.
// samples_out carries the same window two cycles later. vote_en selects
// voting (1) or pass-through (0); it is a configuration bit.
//
// The voting rule and its enable follow the published design. There the
// samples come straight from the 20 samplers on 20 clock phases, and half of
// them pass a flip-flop on the inverted clock before the common retiming
// register. Here the sampler model already presents the window aligned to the
// core clock, so that half-cycle stage is left out; the one-cycle hold for the
// look-ahead neighbour is this design's choice. Reset is asynchronous, active
// low, and clears all state.
module voting_retiming
  import cdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    vote_en,
  input  window_t samples_in,
  output window_t samples_out
);

  window_t raw_q;        // window being voted
  logic    prev_last_q;  // last (latest) sample of the window before raw_q

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_q       <= '0;
      prev_last_q <= 1'b0;
    end else begin
      raw_q       <= samples_in;
      prev_last_q <= raw_q[0];
    end
  end

  // ext holds, earliest first, the previous window's last sample, the window
  // under vote and the next window's first sample.
  logic [NSAMP+1:0] ext;
  window_t          voted;

  always_comb begin
    ext = {prev_last_q, raw_q, samples_in[NSAMP-1]};
    for (int i = 0; i < NSAMP; i++)
      voted[i] = (ext[i] & ext[i+1]) | (ext[i] & ext[i+2]) | (ext[i+1] & ext[i+2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samples_out <= '0;
    else        samples_out <= vote_en ? voted : raw_q;
  end

endmodule
