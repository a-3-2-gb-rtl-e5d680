// transition_counter: transition detector and transition counter of the
// fine-phase detector.
//
// Each sample is XORed with the one before it, t_n = x_n ^ x_(n-1), where
// x_(-1) is the last sample of the previous window. The 20 transition flags
// are then summed per fine phase, T_n = t_n + t_(n+5) + t_(n+10) + t_(n+15),
// giving five counts of 0..4. Purely combinational; follows the published
// block diagram. Window bit 19 is x_0 (earliest).
module transition_counter
  import cdr_pkg::*;
(
  input  window_t samples,
  input  logic    prev_last,          // x_19 of the previous window
  output tcount_t t_cnt [OSR],
  output logic    any_transition
);

  logic [0:NSAMP-1] x;                // x[n] = x_n, earliest first
  logic [0:NSAMP-1] t;

  always_comb begin
    x = samples;
    t[0] = x[0] ^ prev_last;
    for (int n = 1; n < NSAMP; n++)
      t[n] = x[n] ^ x[n-1];
    for (int n = 0; n < OSR; n++) begin
      t_cnt[n] = '0;
      for (int i = 0; i < BITS_PER_WIN; i++)
        t_cnt[n] = t_cnt[n] + tcount_t'(t[OSR*i + n]);
    end
    any_transition = |t;
  end

endmodule
