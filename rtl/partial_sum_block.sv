// partial_sum_block: one stage of the average transition locator.
//
// Two partial sums run through a column of five such blocks, one downwards
// (from earlier to later phases) and one upwards. Each block doubles the sum
// arriving from its neighbour and adds its own transition count T_n, so a
// count m stages away carries weight 2^m. The block also evaluates the
// weighted balance f at the boundary just above it (towards earlier phases),
// f = up_out - down_in, and keeps only its sign. The block is the average
// phase when the balance above it is non-negative and the balance below it
// (msb_in, from the next block down) is negative: one XOR of the two signs.
//
// Timing: purely combinational. Widths: SUM_W bits of unsigned partial sum;
// the default 8 bits holds the largest sum, 4*(1+2+4+8+16) = 124.
// Structure follows the published partial-sum block; the widths are this
// design's own.
module partial_sum_block
  import cdr_pkg::*;
#(
  parameter int unsigned SUM_W = 8
) (
  input  tcount_t          t_cnt,     // transitions on this block's phase
  input  logic [SUM_W-1:0] down_in,   // partial sum from the block above
  output logic [SUM_W-1:0] down_out,  // partial sum to the block below
  input  logic [SUM_W-1:0] up_in,     // partial sum from the block below
  output logic [SUM_W-1:0] up_out,    // partial sum to the block above
  input  logic             msb_in,    // sign of the balance below this block
  output logic             msb_out,   // sign of the balance above this block
  output logic             is_avg     // this block holds the average phase
);

  logic signed [SUM_W:0] balance;

  always_comb begin
    down_out = (down_in << 1) + SUM_W'(t_cnt);
    up_out   = (up_in << 1) + SUM_W'(t_cnt);
    balance  = $signed({1'b0, up_out}) - $signed({1'b0, down_in});
    msb_out  = balance[SUM_W];
    is_avg   = msb_out ^ msb_in;
  end

endmodule
