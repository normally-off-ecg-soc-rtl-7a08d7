// Testbench of the QSW filter: random ADC codes are fed with random gaps, and
// each output is compared with a reference convolution with the scale-2^2
// quadratic-spline wavelet [1 3 2 -2 -3 -1] (computed here from the low-pass
// [1 3 3 1] and the dilated high-pass [1 0 -1]), shifted and saturated. A
// constant input must give zero (baseline removal) and a 60 Hz tone at 128
// samples/s must be attenuated far below a 16 Hz tone of equal amplitude.
module tb_qsw_filter;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] in_data = 0;
  hbd_pkg::sample_t out_data;
  int checks = 0, failures = 0;
  int hist [6];
  int coef [6];

  qsw_filter dut (.*);
  always #5 clk = ~clk;

  task automatic push(input int x, output int y);
    int acc;
    @(negedge clk);
    in_valid = 1; in_data = 8'(x);
    for (int k = 5; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x - 128;
    acc = 0;
    for (int k = 0; k < 6; k++) acc += coef[k] * hist[k];
    acc = acc >>> 2;
    if (acc > 127) acc = 127;
    if (acc < -128) acc = -128;
    @(negedge clk);
    in_valid = 0;
    checks++;
    // out_valid pulsed on the edge after the input; the data is held
    if (int'(out_data) != acc) begin
      failures++;
      $display("FAIL: got %0d expected %0d", out_data, acc);
    end
    y = int'(out_data);
  endtask

  initial begin
    int h [4] = '{1, 3, 3, 1};
    int y, e16, e60;
    for (int k = 0; k < 6; k++) coef[k] = 0;
    for (int a = 0; a < 4; a++) begin   // conv(h, [1 0 -1])
      coef[a]     += h[a];
      coef[a + 2] -= h[a];
    end
    for (int k = 0; k < 6; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      push(int'($urandom_range(255)), y);
      repeat ($urandom_range(3)) @(posedge clk);
    end
    for (int n = 0; n < 10; n++) push(200, y);
    checks++;
    if (y != 0) begin failures++; $display("FAIL: DC gives %0d", y); end
    e16 = 0; e60 = 0;
    for (int n = 0; n < 64; n++) begin
      push(128 + int'(40.0 * $sin(2.0 * 3.14159265 * 16.0 * n / 128.0)), y);
      if (n > 8) e16 += y * y;
    end
    for (int n = 0; n < 64; n++) begin
      push(128 + int'(40.0 * $sin(2.0 * 3.14159265 * 60.0 * n / 128.0)), y);
      if (n > 8) e60 += y * y;
    end
    checks++;
    if (!(e60 * 50 < e16)) begin failures++; $display("FAIL: hum %0d vs QRS band %0d", e60, e16); end
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
