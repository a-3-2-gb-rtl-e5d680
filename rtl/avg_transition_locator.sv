// avg_transition_locator: rounded average transition phase of one window.
//
// Given the transition counts T_0..T_4 of the five fine phases, the block
// finds the phase n where the weighted balance
//   f(h) = sum_n g(n - h) * T_n,   g(+-0.5, +-1.5, +-2.5, +-3.5) = +-(1, 2, 4, 8)
// changes sign, which is the mean transition phase rounded to an integer.
// Power-of-two weights turn every product into a shift, and five
// partial_sum_block stages share the partial sums between all four
// boundaries.
//
// Phase wrap-around is resolved with the previous fine phase p: the five
// phases are read as the contiguous 1 UI region p-2 .. p+2, with the region
// cut between phases p+2 and p+3. The published circuit closes the five
// blocks in a ring and opens it at that point with gates driven by the
// previous one-hot phase. This implementation rotates the counts so that
// phase p+3 (= p-2) feeds the first block of a straight column and rotates
// the one-hot result back. The arithmetic is the same and the netlist has no
// combinational ring; that rotation is this design's choice.
//
// Interface: t_cnt[n] is T_n (0..4); prev_phase and fine_phase are one-hot.
// Purely combinational; the caller registers fine_phase and feeds it back as
// prev_phase. With all counts zero the result is the last phase of the
// region (p+2); the caller holds its previous phase in that case.
module avg_transition_locator
  import cdr_pkg::*;
#(
  parameter int unsigned SUM_W = 8
) (
  input  tcount_t   t_cnt [OSR],
  input  phase_oh_t prev_phase,
  output phase_oh_t fine_phase
);

  logic [2:0] p;
  logic [2:0] ph [OSR];          // fine phase handled by block k
  tcount_t    t_rot [OSR];
  logic [SUM_W-1:0] down [OSR+1];
  logic [SUM_W-1:0] up   [OSR+1];
  logic             msb  [OSR+1];
  logic [OSR-1:0]   avg_rot;

  always_comb begin
    p = oh2idx(prev_phase);
    for (int k = 0; k < OSR; k++) begin
      ph[k]    = 3'((32'(p) + 32'd3 + 32'(k)) % OSR);
      t_rot[k] = t_cnt[ph[k]];
    end
  end

  assign down[0]   = '0;     // nothing above the first block
  assign up[OSR]   = '0;     // nothing below the last block
  assign msb[OSR]  = 1'b1;   // balance below the region counts as negative

  for (genvar k = 0; k < OSR; k++) begin : g_blk
    partial_sum_block #(.SUM_W(SUM_W)) u_psb (
      .t_cnt   (t_rot[k]),
      .down_in (down[k]),
      .down_out(down[k+1]),
      .up_in   (up[k+1]),
      .up_out  (up[k]),
      .msb_in  (msb[k+1]),
      .msb_out (msb[k]),
      .is_avg  (avg_rot[k])
    );
  end

  always_comb begin
    fine_phase = '0;
    for (int k = 0; k < OSR; k++)
      if (avg_rot[k]) fine_phase[ph[k]] = 1'b1;
  end

endmodule
