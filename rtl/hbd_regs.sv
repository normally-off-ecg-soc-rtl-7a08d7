// Register block of the always-on domain, read by the CPU over the low-speed
// bus. It holds the heartbeat detector's latest beat (interval, time, score),
// a beat counter, a lost-lock counter and the detector state. Register map
// (word addresses): 0 IHR in samples, 1 beat count (a write clears it),
// 2 time of the last QRS in samples, 3 {lost count, state}, 4 score of the
// last beat, 5 latest raw ADC code, 6 latest filtered sample (sign-extended).
// The map is this design's choice; the document says only that the ADC output
// goes to both the detector and the MCU and that the CPU stores the detector
// output every second.
module hbd_regs
  import hbd_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hb_valid,
  input  stime_t        hb_tqrs,
  input  logic [8:0]    hb_ihr,
  input  acc_t          hb_score,
  input  logic          lost,
  input  logic          adc_valid,
  input  logic [7:0]    adc_code,
  input  logic          f_valid,
  input  sample_t       f_data,
  input  hbd_state_e    state,
  input  logic          acc,
  input  logic          write,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata
);
  logic [8:0]  ihr_q;
  logic [15:0] beats, losts;
  stime_t      tqrs_q;
  acc_t        score_q;
  logic [7:0]  adc_q;
  sample_t     f_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ihr_q <= '0; beats <= '0; losts <= '0; tqrs_q <= '0; score_q <= '0;
      adc_q <= '0; f_q <= '0;
    end else begin
      if (adc_valid) adc_q <= adc_code;
      if (f_valid)   f_q   <= f_data;
      if (hb_valid) begin
        ihr_q   <= hb_ihr;
        tqrs_q  <= hb_tqrs;
        score_q <= hb_score;
      end
      if (acc && write && addr == AW'(1)) beats <= '0;
      else if (hb_valid)                  beats <= beats + 1'b1;
      if (lost) losts <= losts + 1'b1;
    end
  end

  always_comb begin
    unique case (addr)
      AW'(0):  rdata = 32'(ihr_q);
      AW'(1):  rdata = 32'(beats);
      AW'(2):  rdata = 32'(tqrs_q);
      AW'(3):  rdata = {losts, 12'd0, state};
      AW'(4):  rdata = score_q;
      AW'(5):  rdata = 32'(adc_q);
      AW'(6):  rdata = 32'(signed'(f_q));
      default: rdata = '0;
    endcase
  end
endmodule
