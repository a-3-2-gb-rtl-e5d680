// scan_chain: JTAG-like serial access that configures the CDR and reads
// back the BERT error counter.
//
// A shift register of CFG_W + ERR_W bits runs on its own slow scan clock.
// capture loads it with the current configuration (low bits) and the error
// counter (high bits); shift moves it one place towards scan_out, taking
// scan_in at the top; update copies the low CFG_W bits into the
// configuration register that drives the CDR. Configuration bits:
//   bit 0  vote_en      sample voting on (1) or off (0)
//   bit 1  rclk_out_en  recovered-clock output driver enabled
// Both reset to 1. The published design describes a JTAG-like scan chain
// used to configure the CDR and read the BERT error counter, the voting
// enable and an enable for the recovered-clock output; the register layout,
// the control signals and the reset values are this design's own. The
// captured counter crosses from the core clock domain and is meant to be read
// while it is not counting (quasi-static); the configuration outputs are
// quasi-static and are synchronised by the user of each bit.
module scan_chain #(
  parameter int unsigned CFG_W = 2,
  parameter int unsigned ERR_W = 32
) (
  input  logic             scan_clk,
  input  logic             scan_rst_n,
  input  logic             scan_in,
  input  logic             capture,
  input  logic             shift,
  input  logic             update,
  output logic             scan_out,
  input  logic [ERR_W-1:0] err_cnt,
  output logic [CFG_W-1:0] cfg
);

  logic [CFG_W+ERR_W-1:0] sr_q;

  always_ff @(posedge scan_clk or negedge scan_rst_n) begin
    if (!scan_rst_n) begin
      sr_q <= '0;
      cfg  <= '1;
    end else begin
      if (capture)    sr_q <= {err_cnt, cfg};
      else if (shift) sr_q <= {scan_in, sr_q[CFG_W+ERR_W-1:1]};
      if (update)     cfg  <= sr_q[CFG_W-1:0];
    end
  end

  assign scan_out = sr_q[0];

endmodule
