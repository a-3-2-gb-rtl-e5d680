// bert: built-in bit-error-rate tester for the recovered data.
//
// The test pattern is the 2^31-1 PRBS (polynomial x^31 + x^28 + 1), for
// which every bit equals the XOR of the bits 31 and 28 positions before it.
// The checker is self-synchronising: it keeps the last 31 received bits and
// predicts each new bit from them, so it locks to the pattern after 31 bits
// without a seed, and after a slip of the data it re-locks by itself. Each
// received bit that differs from its prediction counts as one error (a
// single flipped bit is therefore counted three times, once directly and
// once in each of the two predictions it feeds). Errors are counted only
// once 31 bits have been received since reset or clear; the counter
// saturates.
//
// Interface: data_in carries 4 recovered bits per clock, bit 3 earliest,
// when data_valid is high. err_cnt is registered; clear restarts both the
// lock-in and the count. The published design names the BERT and its error
// counter; the pattern checker's insides and the counter width are this
// design's choice.
module bert #(
  parameter int unsigned NB    = 4,   // bits per clock
  parameter int unsigned ERR_W = 32   // error counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             data_valid,
  input  logic [NB-1:0]    data_in,
  output logic [ERR_W-1:0] err_cnt,
  output logic             locked
);

  logic [30:0] hist_q, hist_d;      // hist[0] is the newest bit
  logic [5:0]  seen_q, seen_d;      // bits received, saturating at 31
  logic [2:0]  n_err;
  logic        pred;

  always_comb begin
    hist_d = hist_q;
    seen_d = seen_q;
    n_err  = '0;
    for (int j = NB - 1; j >= 0; j--) begin
      pred = hist_d[30] ^ hist_d[27];
      if (seen_d == 6'd31 && data_in[j] != pred) n_err = n_err + 1'b1;
      hist_d = {hist_d[29:0], data_in[j]};
      if (seen_d != 6'd31) seen_d = seen_d + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q  <= '0;
      seen_q  <= '0;
      err_cnt <= '0;
    end else if (clear) begin
      hist_q  <= '0;
      seen_q  <= '0;
      err_cnt <= '0;
    end else if (data_valid) begin
      hist_q <= hist_d;
      seen_q <= seen_d;
      if (err_cnt > {ERR_W{1'b1}} - ERR_W'(n_err)) err_cnt <= '1;
      else                                          err_cnt <= err_cnt + ERR_W'(n_err);
    end
  end

  assign locked = (seen_q == 6'd31);

endmodule
