// Quadratic spline wavelet (QSW) filter ahead of the heartbeat detector.
// It computes the wavelet transform of the ECG at scale 2^2 with the a-trous
// scheme: the quadratic-spline low-pass h = [1 3 3 1] followed by the
// high-pass g = [1 0 -1] (g dilated by 2). The combined impulse response is
// [1 3 2 -2 -3 -1]; it has zero gain at DC (removes baseline wander) and almost
// none near 50/60 Hz at 128 samples/s (removes hum). The raw sum is shifted
// right by SHIFT and saturated to a signed 8-bit sample.
// The document uses a QSW filter but gives neither scale nor coefficients: the
// scale, the scaling and the saturation are this design's choice.
// Interface: in_valid/in_data (unsigned offset-binary ADC code) -> out_valid/
// out_data one clock later. Each valid input advances the filter by one sample.
module qsw_filter #(
  parameter int unsigned SHIFT = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [7:0]          in_data,
  output logic                out_valid,
  output hbd_pkg::sample_t    out_data
);
  // history of the centred input x[n-1..n-5]
  logic signed [8:0] x [1:5];
  logic signed [8:0] x0;
  logic signed [12:0] acc;

  assign x0 = $signed({1'b0, in_data}) - 9'sd128;

  always_comb begin
    acc = 13'(x0) + 13'sd3 * 13'(x[1]) + 13'sd2 * 13'(x[2])
        - 13'sd2 * 13'(x[3]) - 13'sd3 * 13'(x[4]) - 13'(x[5]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= 5; k++) x[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x[1] <= x0;
        for (int k = 2; k <= 5; k++) x[k] <= x[k-1];
        out_data <= sat8(acc >>> SHIFT);
      end
    end
  end

  function automatic hbd_pkg::sample_t sat8(input logic signed [12:0] v);
    if (v > 13'sd127)       return 8'sd127;
    else if (v < -13'sd128) return -8'sd128;
    else                    return v[7:0];
  endfunction
endmodule
