// Testbench of the timer at its default 32.768 kHz / 128 samples/s / 1 s:
// every sample tick must come exactly 256 clocks after the previous one, and
// every logging tick 128 sample ticks (32768 clocks) after the previous one,
// coinciding with a sample tick.
module tb_rtc_timer;
  logic clk = 0, rst_n = 0, smp_tick, log_tick;
  int checks = 0, failures = 0;
  rtc_timer dut (.*);
  always #5 clk = ~clk;

  int cyc = 0, last_smp = -1, last_log = -1, n_smp = 0, n_log = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (smp_tick) begin
      if (last_smp >= 0) begin
        checks++;
        if (cyc - last_smp != 256) begin failures++; $display("FAIL: sample gap %0d", cyc - last_smp); end
      end
      last_smp = cyc;
      n_smp++;
    end
    if (log_tick) begin
      checks++;
      if (!smp_tick) begin failures++; $display("FAIL: log tick without sample tick"); end
      if (last_log >= 0) begin
        checks++;
        if (cyc - last_log != 32768) begin failures++; $display("FAIL: log gap %0d", cyc - last_log); end
      end
      last_log = cyc;
      n_log++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (32768 * 4 + 10) @(posedge clk);
    checks++;
    if (n_log != 4 || n_smp != 512) begin failures++; $display("FAIL: %0d log, %0d sample ticks", n_log, n_smp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
