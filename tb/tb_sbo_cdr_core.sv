// tb_sbo_cdr_core: end-to-end test of the digital CDR core, open loop.
//
// The samplers are replaced by a model that cuts a 2^31-1 PRBS stream,
// 5 samples per bit, into 20-sample windows at a phase (in samples) that
// the test moves between windows. The core's built-in BERT checks the
// recovered data. Phases of the test:
//   A  constant phase, isolated flipped samples (voting on): no bit errors
//   B  one slow sinusoidal phase excursion of +-8 UI with flipped samples:
//      no bit errors, 3- and 5-bit windows, coarse phase follows the phase
//   C  voting switched off through the scan chain, clean data: no errors;
//      the error counter read through the scan chain matches the port
//   D  a steady phase ramp each way (a frequency error): the FIFO wraps
//      repeatedly and freq_down, then freq_up pulses appear
// Every mechanism (voting correction, fine-phase hold, 3/5-bit windows,
// overflow, underflow, freq_up, freq_down, scan write and readback, BERT
// error detection) is counted and must occur at least once.
module tb_sbo_cdr_core;
  import cdr_pkg::*;

  localparam int NBITS = 80000;
  localparam int PHI_OFS = 1000;     // keeps sample indices positive

  logic clk = 1'b0, rst_n = 1'b0;
  window_t samples = '0;
  logic [3:0] data_out;
  logic [CP_W-1:0] coarse_phase;
  logic freq_up, freq_down, fifo_overflow, fifo_underflow, data_size_3, data_size_5;
  phase_oh_t fine_phase, sampling_phase;
  logic bert_clear = 1'b0;
  logic [31:0] bert_err_cnt;
  logic bert_locked;
  logic scan_clk = 1'b0, scan_rst_n = 1'b0, scan_in = 1'b0;
  logic scan_capture = 1'b0, scan_shift = 1'b0, scan_update = 1'b0, scan_out, rclk_out_en;

  sbo_cdr_core dut (.*);

  always #5  clk = ~clk;
  always #17 scan_clk = ~scan_clk;

  int checks = 0, failures = 0;
  int n_vote = 0, n_hold = 0, n_ds3 = 0, n_ds5 = 0, n_ovf = 0, n_udf = 0, n_up = 0, n_dn = 0;
  int n_scan_wr = 0, n_scan_rd = 0, n_bert_err = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic bits [NBITS];
  int   w_idx = 0;
  int   phi = 0;        // current phase offset in samples; larger = data later
  bit   noisy = 1'b0;

  // event counters, sampled on every core clock
  always @(posedge clk) if (rst_n) begin
    if (dut.u_vote.vote_en && dut.u_vote.voted != dut.u_vote.raw_q) n_vote++;
    if (!dut.u_fpd.any_q) n_hold++;
    if (data_size_3) n_ds3++;
    if (data_size_5) n_ds5++;
    if (fifo_overflow) n_ovf++;
    if (fifo_underflow) n_udf++;
    if (freq_up) n_up++;
    if (freq_down) n_dn++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // the sampler model: one window per clock at the current phase
  bit run = 1'b0;
  always @(negedge clk) if (run) begin
    window_t s;
    for (int n = 0; n < NSAMP; n++)
      s[NSAMP-1-n] = bits[(NSAMP*w_idx + n - phi + PHI_OFS) / OSR];
    if (noisy && ($urandom % 3 == 0)) begin
      // flip one sample whose two neighbours agree (an isolated glitch)
      int k;
      k = 1 + int'($urandom % (NSAMP - 2));
      if (s[k-1] == s[k+1]) s[k] = ~s[k];
    end
    samples <= s;
    w_idx++;
  end

  task automatic window();
    @(negedge clk);
  endtask

  task automatic scan_word(input logic [33:0] din, output logic [33:0] dout);
    @(negedge scan_clk);
    scan_shift = 1'b1;
    for (int i = 0; i < 34; i++) begin
      dout[i] = scan_out;
      scan_in = din[i];
      @(negedge scan_clk);
    end
    scan_shift = 1'b0;
  endtask

  initial begin
    logic [30:0] lfsr;
    logic [33:0] got;
    int cp0, err_b;
    lfsr = 31'h5A5A_1234;
    for (int i = 0; i < NBITS; i++) begin
      bits[i] = lfsr[30] ^ lfsr[27];
      lfsr = {lfsr[29:0], bits[i]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    scan_rst_n = 1'b1;
    run = 1'b1;
    check(rclk_out_en === 1'b1, "recovered clock output enabled after reset");

    // A: constant phase, glitches
    noisy = 1'b1;
    repeat (50) window();
    bert_clear = 1'b1; window(); bert_clear = 1'b0;
    repeat (1000) window();
    check(bert_locked && bert_err_cnt == 0, "A: no errors at constant phase");
    cp0 = int'(coarse_phase);

    // B: sinusoidal excursion of +-40 samples (+-8 UI) over 4000 windows
    for (int i = 0; i < 4000; i++) begin
      phi = int'($floor(40.0 * $sin(2.0 * 3.14159265358979 * i / 4000.0) + 0.5));
      window();
      if (i % 100 == 99) begin
        int expect_cp, d;
        // the data path lags the phase by a few windows; allow one UI
        expect_cp = cp0 - (phi / 5);
        d = int'(coarse_phase) - expect_cp;
        check(d >= -2 && d <= 2, $sformatf("B: coarse phase %0d, expected about %0d", coarse_phase, expect_cp));
      end
    end
    phi = 0;
    repeat (50) window();
    check(bert_err_cnt == 0, $sformatf("B: %0d errors under 8 UI phase excursion", bert_err_cnt));

    // C: voting off through the scan chain, clean data
    noisy = 1'b0;
    scan_word(34'b10, got);
    @(negedge scan_clk); scan_update = 1'b1; @(negedge scan_clk); scan_update = 1'b0;
    n_scan_wr++;
    repeat (10) window();
    check(dut.u_vote.vote_en === 1'b0 && rclk_out_en === 1'b1, "C: voting disabled by scan");
    repeat (500) window();
    check(bert_err_cnt == 0, "C: no errors with voting off");
    // read the counter back through the scan chain while the data is clean
    @(negedge scan_clk); scan_capture = 1'b1; @(negedge scan_clk); scan_capture = 1'b0;
    scan_word(34'b10, got);
    n_scan_rd++;
    check(got === {bert_err_cnt, 2'b10}, $sformatf("C: scan readback %h", got));

    // D: data slower than the local clock (phase ramps up), then faster
    err_b = int'(bert_err_cnt);
    for (int i = 0; i < 3500; i++) begin
      if (i % 10 == 0) phi++;
      window();
    end
    check(n_udf >= 2 && n_dn >= 1 && n_up == 0, "D: repeated underflow gives freq_down only");
    for (int i = 0; i < 7000; i++) begin
      if (i % 10 == 0) phi--;
      window();
    end
    check(n_ovf >= 2 && n_up >= 1, "D: repeated overflow gives freq_up");
    n_bert_err = int'(bert_err_cnt) - err_b;
    @(negedge scan_clk); scan_capture = 1'b1; @(negedge scan_clk); scan_capture = 1'b0;
    scan_word(34'b10, got);
    n_scan_rd++;

    $display("voting corrections %0d, fine-phase holds %0d, 3-bit %0d, 5-bit %0d",
             n_vote, n_hold, n_ds3, n_ds5);
    $display("overflows %0d, underflows %0d, freq_up %0d, freq_down %0d, BERT errors in D %0d",
             n_ovf, n_udf, n_up, n_dn, n_bert_err);
    check(n_vote > 0, "voting corrected samples");
    check(n_hold > 0, "fine phase held in windows without transitions");
    check(n_ds3 > 0 && n_ds5 > 0, "3- and 5-bit windows");
    check(n_scan_wr > 0 && n_scan_rd > 0, "scan write and read");
    check(n_bert_err > 0, "BERT counts errors when the FIFO wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
