// tb_dac_lpf: checks the behavioural DAC / loop-filter model.
//
// With the coarse phase held at 20 for 1000 clocks of 1.25 ns, the DAC
// sources 4.5 * 1.2 uA = 5.4 uA: the capacitor charges to
// 5.4 uA * 1.25 us / 1.5 nF = 4.5 mV and vcntl adds 200 ohm * 5.4 uA =
// 1.08 mV. Then one freq_up clock must add 200 uA * 1.25 ns / 1.5 nF to the
// capacitor. A last clock with freq_down and coarse phase 11 (DAC current
// -5.4 uA) must remove I_fd and the DAC charge and reverse the proportional
// term.
module tb_dac_lpf;

  logic clk = 1'b0;
  logic [4:0] coarse_phase = 5'd20;
  logic freq_up = 1'b0, freq_down = 1'b0;
  real vcntl;
  int checks = 0, failures = 0;

  dac_lpf dut (.*);

  always #0.625 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_v(real v, string what);
    checks++;
    if (vcntl < v - 2.0e-6 || vcntl > v + 2.0e-6) begin
      failures++;
      $display("%s: vcntl %e expected %e", what, vcntl, v);
    end
  endtask

  initial begin
    real vc;
    // the first edge comes half a period after time zero
    repeat (1001) @(posedge clk);
    #0.1;
    vc = 5.4e-6 * 1000.5 * 1.25e-9 / 1.5e-9;
    expect_v(vc + 200.0 * 5.4e-6, "constant coarse phase 20");
    @(negedge clk); freq_up = 1'b1;
    @(posedge clk); #0.1;
    vc = vc + (5.4e-6 + 200.0e-6) * 1.25e-9 / 1.5e-9;
    expect_v(vc + 200.0 * 5.4e-6, "after one freq_up clock");
    @(negedge clk); freq_up = 1'b0; freq_down = 1'b1; coarse_phase = 5'd11;
    @(posedge clk); #0.1;
    vc = vc + (-5.4e-6 - 200.0e-6) * 1.25e-9 / 1.5e-9;
    expect_v(vc - 200.0 * 5.4e-6, "after one freq_down clock at phase 11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
