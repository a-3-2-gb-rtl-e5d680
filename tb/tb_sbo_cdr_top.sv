// tb_sbo_cdr_top: closed-loop test of the whole CDR, all parameters at their
// defaults, with frequency acquisition and sinusoidal jitter.
//
// A transmitter model sends a 2^31-1 PRBS; every edge can be moved by a
// sinusoidal jitter A*sin(2*pi*fj*t) UI whose amplitude is ramped. The VCO
// starts at its 800 MHz free-running frequency (3.2 Gb/s) while the data
// arrives 5% slower, so the loop first has to pull in: the FIFO wraps
// repeatedly and the frequency detector steps the control voltage down.
// The test then
//   1  waits for frequency lock (no FIFO wrap for 20000 clocks) and checks
//      that the BERT runs error-free for 20000 clocks without jitter
//   2  applies 200 UI peak-to-peak jitter at 200 kHz, its amplitude ramped up
//      over three jitter periods, held for two and ramped down over three,
//      and requires no bit error (the published tolerance at this frequency)
//   3  applies 0.3 UI peak-to-peak at 50 MHz, far beyond the loop bandwidth,
//      and requires no bit error (below the 2/5 UI the oversampler absorbs
//      on its own)
//   4  steps the data rate up by 5%, to 3.2 Gb/s: the FIFO overflows
//      repeatedly, freq_up pulses pull the VCO up, and after re-lock the
//      data must again be error-free
//   5  applies 200 UI peak-to-peak at 2 MHz, far beyond the tolerance, and
//      requires that the BERT sees errors (last, because so fast a swing can
//      pull the loop far off frequency, beyond what it can re-acquire)
// Mechanisms counted: freq_down, freq_up, underflow, overflow, 3- and 5-bit windows,
// fine-phase holds, BERT errors. All top parameters are at their defaults.
module tb_sbo_cdr_top;
  import cdr_pkg::*;

  logic rx = 1'b0, rst_n = 1'b0;
  logic rclk, rclk_out;
  logic [3:0] data_out;
  logic [CP_W-1:0] coarse_phase;
  logic freq_up, freq_down, fifo_overflow, fifo_underflow, data_size_3, data_size_5;
  phase_oh_t fine_phase, sampling_phase;
  logic bert_clear = 1'b0;
  logic [31:0] bert_err_cnt;
  logic bert_locked;
  logic scan_clk = 1'b0, scan_rst_n = 1'b0, scan_in = 1'b0;
  logic scan_capture = 1'b0, scan_shift = 1'b0, scan_update = 1'b0, scan_out;

  sbo_cdr_top dut (.*);

  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_ovf = 0, n_udf = 0, n_ds3 = 0, n_ds5 = 0, n_hold = 0;
  int cycles = 0, last_wrap = 0;

  initial begin
    #1500000;          // 1.5 ms
    failures++;
    $display("watchdog expired after %0d clocks", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #50 scan_clk = ~scan_clk;

  always @(posedge rclk) begin
    cycles++;
    if (rst_n) begin
      if (freq_up) n_up++;
      if (freq_down) n_dn++;
      if (fifo_overflow) begin n_ovf++; last_wrap = cycles; end
      if (fifo_underflow) begin n_udf++; last_wrap = cycles; end
      if (data_size_3) n_ds3++;
      if (data_size_5) n_ds5++;
      if (!dut.u_core.u_fpd.any_q) n_hold++;
    end
  end

  // transmitter: PRBS31, unit interval ui_ns, sinusoidal jitter
  real ui_ns = 1.0e9 / (3.2e9 * 0.95);
  real jit_amp_ui = 0.0;     // peak amplitude in UI (half of peak-to-peak)
  real jit_f_hz = 0.0;
  real jit_t0 = 0.0;
  real jit_ramp_ns = 0.0;    // amplitude rises (and at the end falls) linearly over this time
  real jit_dur_ns = 0.0;     // jitter applies to edges with nominal time in [t0, t0 + dur)
  initial begin
    logic [30:0] lfsr;
    real t_nom, t_edge;
    lfsr = 31'h1357_2468;
    t_nom = 3.0;
    forever begin
      logic b;
      b = lfsr[30] ^ lfsr[27];
      lfsr = {lfsr[29:0], b};
      t_edge = t_nom;
      if (jit_amp_ui != 0.0 && t_nom >= jit_t0 && t_nom < jit_t0 + jit_dur_ns) begin
        real a;
        a = jit_amp_ui;
        if (t_nom - jit_t0 < jit_ramp_ns) a = a * (t_nom - jit_t0) / jit_ramp_ns;
        if (jit_t0 + jit_dur_ns - t_nom < jit_ramp_ns)
          a = a * (jit_t0 + jit_dur_ns - t_nom) / jit_ramp_ns;
        t_edge = t_nom + a * ui_ns * $sin(2.0 * PI * jit_f_hz * (t_nom - jit_t0) * 1.0e-9);
      end
      if (t_edge > $realtime) #(t_edge - $realtime);
      rx = b;
      t_nom = t_nom + ui_ns;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // apply jitter for dur_ns (a whole number of jitter periods) and wait for it
  task automatic jitter(real pp_ui, real f_hz, real ramp_ns, real dur_ns);
    jit_t0 = $realtime + 100.0;
    jit_ramp_ns = ramp_ns;
    jit_dur_ns = dur_ns;
    jit_f_hz = f_hz;
    jit_amp_ui = pp_ui / 2.0;
    #(dur_ns + 400.0);
    jit_amp_ui = 0.0;
  endtask

  task automatic clocks(int n);
    repeat (n) @(posedge rclk);
  endtask

  initial begin
    int e0, t_lock;
    repeat (5) @(posedge rclk);
    rst_n = 1'b1;
    scan_rst_n = 1'b1;
    // 1: frequency acquisition, then lock
    while (cycles - last_wrap < 20000 && cycles < 150000) clocks(1000);
    t_lock = cycles;
    $display("frequency lock after %0d clocks: vcntl %f V, freq_down %0d, freq_up %0d",
             t_lock, dut.vcntl, n_dn, n_up);
    check(cycles - last_wrap >= 20000, "frequency lock");
    bert_clear = 1'b1; clocks(2); bert_clear = 1'b0;
    clocks(20000);
    check(bert_locked && bert_err_cnt == 0,
          $sformatf("no errors after lock (%0d)", bert_err_cnt));
    // 2: 200 UI p-p at 200 kHz: 15 us ramp up, two full periods, 15 us ramp down
    e0 = int'(bert_err_cnt);
    jitter(200.0, 200.0e3, 15000.0, 40000.0);
    clocks(2000);
    $display("200 UI p-p at 200 kHz: %0d errors, coarse phase now %0d", int'(bert_err_cnt) - e0, coarse_phase);
    check(int'(bert_err_cnt) == e0, "no errors with 200 UI p-p at 200 kHz");
    // 3: 0.3 UI p-p at 50 MHz
    e0 = int'(bert_err_cnt);
    jitter(0.3, 50.0e6, 0.0, 2000.0);
    clocks(2000);
    $display("0.3 UI p-p at 50 MHz: %0d errors", int'(bert_err_cnt) - e0);
    check(int'(bert_err_cnt) == e0, "no errors with 0.3 UI p-p at 50 MHz");
    // 4: data rate steps up by 5%, to 3.2 Gb/s: re-acquire upwards
    begin
      int up0, ovf0;
      up0 = n_up; ovf0 = n_ovf;
      ui_ns = 1.0e9 / (3.2e9 * 1.0);
      clocks(5000);
      while (cycles - last_wrap < 20000 && cycles < t_lock + 400000) clocks(1000);
      $display("re-lock after %0d clocks: vcntl %f V", cycles, dut.vcntl);
      check(n_up > up0 && n_ovf > ovf0, "freq_up pulses and overflows after the rate step");
      bert_clear = 1'b1; clocks(2); bert_clear = 1'b0;
      clocks(20000);
      check(bert_locked && bert_err_cnt == 0,
            $sformatf("no errors after re-lock (%0d)", bert_err_cnt));
    end


    // 5: 200 UI p-p at 2 MHz, beyond tolerance
    e0 = int'(bert_err_cnt);
    jitter(200.0, 2.0e6, 0.0, 2000.0);
    clocks(100);
    $display("200 UI p-p at 2 MHz: %0d errors", int'(bert_err_cnt) - e0);
    check(int'(bert_err_cnt) > e0, "errors detected beyond the jitter tolerance");

    $display("freq_up %0d freq_down %0d overflow %0d underflow %0d 3-bit %0d 5-bit %0d holds %0d",
             n_up, n_dn, n_ovf, n_udf, n_ds3, n_ds5, n_hold);
    check(n_dn > 0, "freq_down pulses during acquisition");
    check(n_udf > 0 && n_ovf > 0, "FIFO underflow and overflow");
    check(n_up > 0, "freq_up pulses");
    check(n_ds3 > 0 && n_ds5 > 0, "3- and 5-bit windows");
    check(n_hold > 0, "fine-phase holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
