// Always-on timer of the 32.768 kHz domain. A free-running counter divides
// the real-time clock into the ECG sample tick (one clock pulse every
// CLK_HZ/FS_HZ = 256 cycles, 128 samples/s) and a logging tick (one pulse every
// LOG_SAMPLES samples, 1 s by default) that wakes the MCU to store the heart
// rate. The rates follow the document; the counter structure is this design's.
module rtc_timer #(
  parameter int unsigned CLK_HZ      = 32768,
  parameter int unsigned FS_HZ       = 128,
  parameter int unsigned LOG_SAMPLES = 128
) (
  input  logic clk,
  input  logic rst_n,
  output logic smp_tick,   // one-cycle pulse per ECG sample
  output logic log_tick    // one-cycle pulse per logging period
);
  localparam int unsigned DIV = CLK_HZ / FS_HZ;
  logic [$clog2(DIV)-1:0]         div_cnt;
  logic [$clog2(LOG_SAMPLES)-1:0] smp_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      smp_cnt  <= '0;
      smp_tick <= 1'b0;
      log_tick <= 1'b0;
    end else begin
      smp_tick <= 1'b0;
      log_tick <= 1'b0;
      if (div_cnt == ($clog2(DIV))'(DIV - 1)) begin
        div_cnt  <= '0;
        smp_tick <= 1'b1;
        if (smp_cnt == ($clog2(LOG_SAMPLES))'(LOG_SAMPLES - 1)) begin
          smp_cnt  <= '0;
          log_tick <= 1'b1;
        end else begin
          smp_cnt <= smp_cnt + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end
endmodule
