// tb_jitter_tolerance: sinusoidal jitter tolerance of the closed-loop CDR at
// 2.4 Gb/s, the rate of the published measurements.
//
// The VCO model is centred on 600 MHz (2.4 Gb/s / 4). After lock, jitter is
// applied with its amplitude ramped up over three jitter periods, held for
// two and ramped down over three, as a tester raises the amplitude step by
// step. Checked: no bit error at the published point of 200 UI peak-to-peak
// at 200 kHz, and none at 0.3 UI peak-to-peak at 50 MHz, below the 2/5 UI
// that a 5x oversampler tolerates at high jitter frequencies. For
// information the test also raises the 200 kHz amplitude in steps (250,
// 300, 400 UI) and reports the error count of each step. At 5 MHz and 1 MHz
// the amplitude is raised until the first step with errors; the largest
// error-free step must be at least the published measured tolerance there
// (about 1.5 UI and 14 UI peak-to-peak). The model has ideal samplers and
// no supply noise, so it is expected to do better than the chip.
module tb_jitter_tolerance;
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

  // VCO centred on 2.4 Gb/s / 4, the rate of the published jitter measurements
  sbo_cdr_top #(.F_CENTER_HZ(600.0e6)) dut (.*);

  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_ovf = 0, n_udf = 0, n_ds3 = 0, n_ds5 = 0, n_hold = 0;
  int cycles = 0, last_wrap = 0;

  initial begin
    #3000000;          // 3 ms
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
  real ui_ns = 1.0e9 / 2.4e9;
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

  // one tolerance point: returns the number of bit errors
  task automatic point(real pp_ui, real f_hz, output int errs);
    real per;
    int e0;
    per = 1.0e9 / f_hz;
    e0 = int'(bert_err_cnt);
    jitter(pp_ui, f_hz, 3.0 * per, 8.0 * per);
    clocks(3000);
    errs = int'(bert_err_cnt) - e0;
    $display("%0.1f UI p-p at %0.0f kHz: %0d errors", pp_ui, f_hz / 1.0e3, errs);
    // let the loop settle again after a failing point
    if (errs != 0) begin
      clocks(30000);
      bert_clear = 1'b1; clocks(2); bert_clear = 1'b0;
      clocks(2000);
    end
  endtask

  initial begin
    int errs;
    real steps [3] = '{250.0, 300.0, 400.0};
    real lad5 [8] = '{1.0, 1.5, 2.0, 3.0, 4.0, 6.0, 8.0, 12.0};
    real lad1 [6] = '{10.0, 14.0, 20.0, 28.0, 40.0, 56.0};
    real tol5 = 0.0, tol1 = 0.0;
    repeat (5) @(posedge rclk);
    rst_n = 1'b1;
    scan_rst_n = 1'b1;
    clocks(20000);
    bert_clear = 1'b1; clocks(2); bert_clear = 1'b0;
    clocks(5000);
    check(bert_locked && bert_err_cnt == 0, "lock at 2.4 Gb/s without errors");
    point(200.0, 200.0e3, errs);
    check(errs == 0, "200 UI p-p at 200 kHz");
    point(0.3, 50.0e6, errs);
    check(errs == 0, "0.3 UI p-p at 50 MHz");
    // ladders at 5 MHz and 1 MHz, each stopped at its first failing step
    foreach (lad5[i]) begin
      point(lad5[i], 5.0e6, errs);
      if (errs != 0) break;
      tol5 = lad5[i];
    end
    foreach (lad1[i]) begin
      point(lad1[i], 1.0e6, errs);
      if (errs != 0) break;
      tol1 = lad1[i];
    end
    $display("largest error-free step: %0.1f UI p-p at 5 MHz, %0.1f UI p-p at 1 MHz",
             tol5, tol1);
    check(tol5 >= 1.5, "at least the measured 1.5 UI p-p at 5 MHz");
    check(tol1 >= 14.0, "at least the measured 14 UI p-p at 1 MHz");
    foreach (steps[i]) point(steps[i], 200.0e3, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
