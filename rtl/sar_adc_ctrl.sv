// Successive-approximation register logic of the 8-bit SAR ADC. On start it
// resolves one bit per clock from the MSB down: the trial code goes to the
// capacitive DAC (dac_code), the analog comparator answers cmp_hi = 1 when the
// input is at or above the DAC level, and the bit is kept or cleared. After
// BITS clocks the result and a one-cycle done pulse appear. A start while busy
// is ignored. The document names an 8-bit SAR ADC; the one-bit-per-clock
// timing at 32.768 kHz and the handshake are this design's choice.
module sar_adc_ctrl #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            cmp_hi,
  output logic [BITS-1:0] dac_code,
  output logic            busy,
  output logic            done,
  output logic [BITS-1:0] result
);
  logic [BITS-1:0] sar;    // bits decided so far
  logic [BITS-1:0] probe;  // one-hot bit under test

  assign dac_code = sar | probe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sar    <= '0;
      probe  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          sar   <= '0;
          probe <= {1'b1, {(BITS-1){1'b0}}};
        end
      end else begin
        if (cmp_hi) sar <= sar | probe;
        probe <= probe >> 1;
        if (probe[0]) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= cmp_hi ? (sar | probe) : sar;
        end
      end
    end
  end
endmodule
