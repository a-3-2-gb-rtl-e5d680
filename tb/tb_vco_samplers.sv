// tb_vco_samplers: checks the behavioural VCO / sampler model.
//
// The clock period is measured over 200 periods at control voltages of 0,
// +10 mV and -20 mV and compared with 1 / (F_CENTER + KOSC * vcntl / (2*pi));
// a control voltage of 1 V, far outside the range, must give the upper
// tuning limit. The received signal is
// the VCO clock itself delayed by 30 ps, so that samples 1..10 of every
// period see a 1 and the others a 0; every presented window must show that.
module tb_vco_samplers;
  import cdr_pkg::*;

  real     vcntl = 0.0;
  logic    rx, clk;
  window_t samples;
  int checks = 0, failures = 0;

  vco_samplers dut (.*);

  localparam real PI = 3.14159265358979;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(clk) rx <= #0.03 clk;

  task automatic measure(real v, real f_expect);
    real t0, per, per_exp;
    vcntl = v;
    repeat (3) @(posedge clk);
    t0 = $realtime;
    repeat (200) @(posedge clk);
    per = ($realtime - t0) / 200.0;
    per_exp = 1.0e9 / f_expect;
    checks++;
    if (per < per_exp - 0.002 || per > per_exp + 0.002) begin
      failures++;
      $display("vcntl %f: period %f ns expected %f ns", v, per, per_exp);
    end
  endtask

  initial begin
    window_t exp_w;
    rx = 1'b0;
    exp_w = '0;
    for (int k = 1; k <= 10; k++) exp_w[NSAMP-1-k] = 1'b1;
    measure(0.0, 800.0e6);
    measure(0.01, 800.0e6 + 30.0e9 * 0.01 / (2.0 * PI));
    measure(-0.02, 800.0e6 - 30.0e9 * 0.02 / (2.0 * PI));
    measure(1.0, 875.0e6);
    vcntl = 0.0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      checks++;
      if (samples !== exp_w) begin
        failures++;
        $display("window %b expected %b", samples, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
