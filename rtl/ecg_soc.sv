// Normally-off ECG monitoring SoC: the digital part of the chip.
//
// Always-on 32.768 kHz domain: the timer issues the 128 samples/s tick and a
// 1 s logging tick. On each sample tick the SAR logic converts the amplified
// ECG (one bit per clock against the external DAC/comparator), the QSW filter
// removes baseline wander and hum, and the heartbeat detector tracks the QRS
// complexes and reports each beat's interval. The detector switches the ADC
// off between predicted beats (adc_en). The power controller wakes the
// normally-off 24 MHz domain on the logging tick, recalls its state from the
// non-volatile RAM and flip-flops, and stores it again and powers the domain
// down when the CPU enters deep sleep. The raw ADC code, the filtered sample
// and the detector results are readable by the CPU.
//
// Normally-off 24 MHz domain: the 16 KB non-volatile RAM (instruction and data
// memory of the CPU) and the low-speed bus bridge through which the CPU reads
// the detector registers. The CPU core, its non-volatile flip-flops, the
// analog front end, the ADC's DAC and comparator and both oscillators are
// outside this module: their signals are ports. clk24 must only run while
// osc24_en is high; vdd24 is the switched supply state seen by the NVRAM.
module ecg_soc
  import hbd_pkg::*;
  import nvram_pkg::*;
(
  input  logic        clk32,
  input  logic        por_n,
  // SAR ADC analog part
  output logic [7:0]  adc_dac,
  input  logic        adc_cmp,
  output logic        adc_en,
  // 24 MHz domain power
  input  logic        clk24,
  output logic        vdd24_en,
  output logic        osc24_en,
  output logic        iso24,
  // CPU core
  output logic        cpu_rst_n,
  output logic        cpu_irq,
  input  logic        cpu_sleepdeep,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [31:0] mem_wdata,
  input  logic [3:0]  mem_be,
  output logic [31:0] mem_rdata,
  output logic        mem_ready,
  input  logic        ls_sel,
  input  logic        ls_write,
  input  logic [7:0]  ls_addr,
  input  logic [31:0] ls_wdata,
  output logic [31:0] ls_rdata,
  output logic        ls_ready,
  // CPU non-volatile flip-flops
  output logic        ff_store_req,
  input  logic        ff_store_ack,
  output logic        ff_recall_req,
  input  logic        ff_recall_ack,
  // beat output (also readable over the low-speed bus)
  output logic        hb_valid,
  output logic [8:0]  hb_ihr
);
  // ---------------- always-on domain ----------------
  logic smp_tick, log_tick;
  logic adc_busy, adc_done;
  logic [7:0] adc_result;
  logic f_valid;
  sample_t f_data;
  stime_t hb_tqrs;
  acc_t hb_score;
  logic lost;
  hbd_state_e hbd_state;

  rtc_timer u_timer (.clk(clk32), .rst_n(por_n), .smp_tick, .log_tick);

  sar_adc_ctrl u_sar (
    .clk(clk32), .rst_n(por_n), .start(smp_tick && adc_en), .cmp_hi(adc_cmp),
    .dac_code(adc_dac), .busy(adc_busy), .done(adc_done), .result(adc_result));

  qsw_filter u_qsw (
    .clk(clk32), .rst_n(por_n), .in_valid(adc_done), .in_data(adc_result),
    .out_valid(f_valid), .out_data(f_data));

  heartbeat_detector u_hbd (
    .clk(clk32), .rst_n(por_n), .smp_tick, .smp_valid(f_valid), .smp_data(f_data),
    .adc_en, .hb_valid, .hb_tqrs, .hb_ihr, .hb_score, .lost, .state(hbd_state));

  logic dom_rst_n;
  logic ram_store_req, ram_store_ack, ram_recall_req, ram_recall_ack;

  nv_power_ctrl u_pwr (
    .clk(clk32), .rst_n(por_n), .wake_req(log_tick), .sleepdeep(cpu_sleepdeep),
    .vdd_en(vdd24_en), .osc_en(osc24_en), .iso(iso24), .dom_rst_n, .cpu_rst_n,
    .cpu_irq, .ram_store_req, .ram_store_ack, .ram_recall_req, .ram_recall_ack,
    .ff_store_req, .ff_store_ack, .ff_recall_req, .ff_recall_ack);

  logic l_acc, l_write;
  logic [7:0] l_addr;
  logic [31:0] l_wdata, l_rdata;

  hbd_regs u_regs (
    .clk(clk32), .rst_n(por_n), .hb_valid, .hb_tqrs, .hb_ihr, .hb_score, .lost,
    .adc_valid(adc_done), .adc_code(adc_result), .f_valid, .f_data,
    .state(hbd_state), .acc(l_acc), .write(l_write), .addr(l_addr), .rdata(l_rdata));

  // ---------------- normally-off 24 MHz domain ----------------
  logic gclk_en;

  nvram u_nvram (
    .clk(clk24), .rst_n(dom_rst_n), .vdd(vdd24_en), .req(mem_req), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .be(mem_be), .rdata(mem_rdata),
    .ready(mem_ready), .store_req(ram_store_req), .store_ack(ram_store_ack),
    .recall_req(ram_recall_req), .recall_ack(ram_recall_ack));

  lsbus_bridge #(.AW(8)) u_lsb (
    .hclk(clk24), .hrst_n(dom_rst_n), .sel(ls_sel), .write(ls_write),
    .addr(ls_addr), .wdata(ls_wdata), .rdata(ls_rdata), .ready(ls_ready),
    .gclk_en, .lclk(clk32), .lrst_n(por_n), .l_acc, .l_write, .l_addr,
    .l_wdata, .l_rdata);
endmodule
