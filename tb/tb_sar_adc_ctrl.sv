// Testbench of the SAR logic: an ideal comparator compares a held input level
// with the DAC code. For every input 0..255 the result must equal the input,
// arrive exactly BITS+1 clocks after start (start edge, 8 bit decisions), and
// a start while busy must be ignored.
module tb_sar_adc_ctrl;
  logic clk = 0, rst_n = 0, start = 0, cmp_hi, busy, done;
  logic [7:0] dac_code, result;
  int vin = 0;
  int checks = 0, failures = 0;
  sar_adc_ctrl dut (.*);
  assign cmp_hi = vin >= int'(dac_code);
  always #5 clk = ~clk;

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      vin = v;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = (v % 3 == 0);   // a second start while busy is ignored
      cyc = 1;
      while (!done) begin @(negedge clk); start = 0; cyc++; end
      checks += 2;
      if (result != 8'(v)) begin failures++; $display("FAIL: in %0d out %0d", v, result); end
      if (cyc != 9) begin failures++; $display("FAIL: conversion took %0d clocks", cyc); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL: restarted while busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
