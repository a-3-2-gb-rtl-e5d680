// tb_scan_chain: self-checking test of the configuration / readback scan
// chain.
//
// Checks the reset configuration (all ones), writes each configuration
// value by shifting 34 bits and pulsing update, and reads back a captured
// error count bit by bit from scan_out (configuration bits first, then the
// counter from its least significant bit), for several random counts.
module tb_scan_chain;

  logic scan_clk = 1'b0, scan_rst_n = 1'b0;
  logic scan_in = 1'b0, capture = 1'b0, shift = 1'b0, update = 1'b0;
  logic scan_out;
  logic [31:0] err_cnt = '0;
  logic [1:0]  cfg;
  int checks = 0, failures = 0;

  scan_chain dut (.*);

  always #5 scan_clk = ~scan_clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shift 34 bits in (word bit 0 first out of scan_out), returning what came out
  task automatic shift_word(input logic [33:0] din, output logic [33:0] dout);
    shift = 1'b1;
    for (int i = 0; i < 34; i++) begin
      dout[i] = scan_out;
      scan_in = din[i];
      @(negedge scan_clk);
    end
    shift = 1'b0;
  endtask

  initial begin
    logic [33:0] got;
    repeat (2) @(negedge scan_clk);
    scan_rst_n = 1'b1;
    checks++;
    if (cfg !== 2'b11) begin failures++; $display("reset cfg %b", cfg); end
    for (int v = 0; v < 4; v++) begin
      shift_word({32'hDEAD_BEEF, 2'(v)}, got);
      update = 1'b1;
      @(negedge scan_clk);
      update = 1'b0;
      checks++;
      if (cfg !== 2'(v)) begin failures++; $display("cfg %b expected %0d", cfg, v); end
    end
    for (int k = 0; k < 8; k++) begin
      logic [31:0] cap;
      cap = $urandom;
      err_cnt = cap;
      capture = 1'b1;
      @(negedge scan_clk);
      capture = 1'b0;
      err_cnt = $urandom;            // must not disturb the captured value
      shift_word('0, got);
      checks++;
      if (got !== {cap, 2'b11}) begin
        failures++;
        $display("readback %h expected %h", got, {cap, 2'b11});
      end
    end
    // a known value
    err_cnt = 32'h1234_5678;
    capture = 1'b1;
    @(negedge scan_clk);
    capture = 1'b0;
    shift_word('0, got);
    checks++;
    if (got !== {32'h1234_5678, 2'b11}) begin
      failures++;
      $display("readback %h", got);
    end
    // update after a pure capture must keep the configuration
    capture = 1'b1;
    @(negedge scan_clk);
    capture = 1'b0;
    update = 1'b1;
    @(negedge scan_clk);
    update = 1'b0;
    checks++;
    if (cfg !== 2'b11) begin failures++; $display("cfg changed by capture/update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
