// End-to-end testbench of the ECG SoC at its default parameters.
//
// Analog side: a synthetic ECG (R-wave every 96 samples, i.e. 80 beats/min, on
// a slow baseline wander with noise) is held at each sample tick and compared
// with the SAR DAC code, as the ADC comparator would. Between 8 s and 10 s the
// QRS complexes vanish, so the detector loses lock and must reacquire.
// Clocks: 32.768 kHz always; the 24 MHz clock only while osc24_en is high.
// CPU side: a behavioural stand-in for the CPU core. At cold boot it writes a
// program image into the NVRAM and a log index, then enters deep sleep. On
// every wake-up interrupt it checks the image (proving store and recall across
// power-off), reads the detector registers over the low-speed bus, appends the
// IHR to a log in NVRAM, checks the older log entries, and sleeps again. The
// CPU's non-volatile flip-flops are modelled by acknowledging after a delay.
// Checked: the logged IHR equals the true period once beats are reported;
// NVRAM contents survive every power-off; each store/recall takes 128 clocks;
// and every mechanism happened: ADC sleep, engine stall, lost lock and
// reacquisition, store, recall, charge sharing, clock gating of the bus bridge.
module tb_ecg_soc;
  import hbd_pkg::*;
  import nvram_pkg::*;

  localparam int PERIOD = 96;
  localparam int NSAMP  = 17 * 128;

  logic clk32 = 0, por_n = 0, clk24 = 0;
  logic [7:0] adc_dac;
  logic adc_cmp, adc_en;
  logic vdd24_en, osc24_en, iso24;
  logic cpu_rst_n, cpu_irq;
  logic cpu_sleepdeep = 0;
  logic mem_req = 0, mem_we = 0;
  logic [AW-1:0] mem_addr = '0;
  logic [31:0] mem_wdata = '0;
  logic [3:0] mem_be = '0;
  logic [31:0] mem_rdata;
  logic mem_ready;
  logic ls_sel = 0, ls_write = 0;
  logic [7:0] ls_addr = '0;
  logic [31:0] ls_wdata = '0, ls_rdata;
  logic ls_ready;
  logic ff_store_req, ff_recall_req;
  logic ff_store_ack = 0, ff_recall_ack = 0;
  logic hb_valid;
  logic [8:0] hb_ihr;

  ecg_soc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // clocks
  always #15259 clk32 = ~clk32;
  always begin
    if (osc24_en) #21 clk24 = ~clk24;
    else @(posedge osc24_en);
  end

  // analog ECG and comparator
  int t_smp = 0;
  int vin = 128;
  function automatic int ecg(input int t);
    int ph, v;
    real w;
    ph = t % PERIOD;
    w  = 12.0 * $sin(2.0 * 3.14159265 * real'(t) / 400.0);
    v  = 100 + int'(w);
    if (!(t >= 8 * 128 && t < 10 * 128)) begin
      case (ph)
        40: v -= 8;  41: v += 20; 42: v += 60; 43: v += 100;
        44: v += 60; 45: v += 20; 46: v -= 15; 47: v -= 6;
        default: ;
      endcase
    end
    v += int'($urandom_range(6)) - 3;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  always @(posedge clk32) if (dut.smp_tick) begin
    t_smp <= t_smp + 1;
    vin <= ecg(t_smp + 1);
  end
  assign adc_cmp = (vin >= int'(adc_dac));

  // non-volatile flip-flops of the CPU: acknowledge after a few clocks
  always @(posedge clk24) begin
    ff_store_ack  <= ff_store_req;
    ff_recall_ack <= ff_recall_req;
  end

  // CPU bus tasks (drive and sample on the falling edge)
  task automatic mem_wr(input int a, input logic [31:0] d);
    @(negedge clk24);
    mem_req <= 1; mem_we <= 1; mem_addr <= AW'(a); mem_wdata <= d; mem_be <= 4'hf;
    do @(negedge clk24); while (!mem_ready);
    mem_req <= 0; mem_we <= 0;
  endtask
  task automatic mem_rd(input int a, output logic [31:0] d);
    @(negedge clk24);
    mem_req <= 1; mem_we <= 0; mem_addr <= AW'(a);
    do @(negedge clk24); while (!mem_ready);
    d = mem_rdata;
    mem_req <= 0;
  endtask
  task automatic ls_rd(input int a, output logic [31:0] d);
    @(negedge clk24);
    ls_sel <= 1; ls_write <= 0; ls_addr <= 8'(a);
    do @(negedge clk24); while (!ls_ready);
    d = ls_rdata;
    ls_sel <= 0;
  endtask

  function automatic logic [31:0] image(input int a);
    return 32'hC0DE_0000 ^ (a * 32'h9E37_79B9);
  endfunction

  // CPU stand-in
  int wakes = 0, logged_ok = 0, log_n = 0;
  int log_ref [64];
  initial begin
    logic [31:0] d;
    @(posedge cpu_rst_n);
    for (int a = 0; a < 64; a++) mem_wr(a * 64 + (a % 7), image(a));  // spread over all macros
    mem_wr(4000, 0);
    forever begin
      cpu_sleepdeep <= 1;
      @(negedge cpu_rst_n);
      cpu_sleepdeep <= 0;
      @(posedge cpu_irq);
      wakes++;
      for (int a = 0; a < 64; a++) begin
        mem_rd(a * 64 + (a % 7), d);
        check(d == image(a), $sformatf("image word %0d after wake %0d", a, wakes));
      end
      mem_rd(4000, d);
      check(int'(d) == log_n, $sformatf("log index %0d, expected %0d", d, log_n));
      for (int k = 0; k < log_n; k++) begin
        logic [31:0] e;
        mem_rd(4001 + k, e);
        check(int'(e) == log_ref[k], $sformatf("log entry %0d", k));
      end
      begin
        logic [31:0] ihr, beats;
        ls_rd(0, ihr);
        ls_rd(1, beats);
        begin
          logic [31:0] raw;
          ls_rd(5, raw);
          check(int'(raw) >= 60 && int'(raw) <= 150 || !adc_en, $sformatf("raw ADC code %0d", raw));
        end
        if (beats != 0 && dut.u_hbd.state != S_FILL && dut.u_hbd.state != S_COARSE &&
            dut.u_hbd.state != S_FINE) begin
          check(int'(ihr) >= PERIOD - 1 && int'(ihr) <= PERIOD + 1,
                $sformatf("logged IHR %0d", ihr));
          logged_ok++;
        end
        if (log_n < 64) begin
          mem_wr(4001 + log_n, ihr);
          log_ref[log_n] = int'(ihr);
          log_n++;
          mem_wr(4000, 32'(log_n));
        end
      end
    end
  end

  // mechanism counters
  int stores = 0, recalls = 0, shares = 0, step_cyc = 0, adc_off = 0, stalls = 0;
  int losts = 0, beats_after = 0, gated = 0, ungated = 0;
  always @(posedge clk24) begin
    if (dut.u_nvram.m_pl.step) begin
      step_cyc++;
      if (dut.u_nvram.m_pl.share) shares++;
    end else if (step_cyc != 0) begin
      check(step_cyc == 128, $sformatf("store/recall took %0d clocks", step_cyc));
      step_cyc = 0;
    end
    if (dut.u_nvram.u_ctrl.cs == 1 && dut.u_nvram.m_pl.row == 0) stores++;
    if (dut.u_nvram.u_ctrl.cs == 2 && dut.u_nvram.m_pl.row == 0) recalls++;
    if (dut.dom_rst_n) begin
      if (dut.gclk_en) ungated++; else gated++;
    end
  end
  always @(posedge clk32) begin
    if (dut.smp_tick && !adc_en) adc_off++;
    if (dut.u_hbd.stall) stalls++;
    if (dut.lost) losts++;
    if (hb_valid && t_smp > 10 * 128 && losts > 0) beats_after++;
    if (hb_valid && t_smp < 8 * 128 && dut.u_hbd.tm_init == 0)
      check(int'(hb_ihr) >= PERIOD - 1 && int'(hb_ihr) <= PERIOD + 1,
            $sformatf("beat interval %0d at sample %0d", hb_ihr, t_smp));
  end

  initial begin
    repeat (3) @(posedge clk32);
    por_n = 1;
    wait (t_smp >= NSAMP);
    $display("wakes=%0d logged_ok=%0d stores=%0d recalls=%0d shares=%0d adc_off=%0d stalls=%0d lost=%0d beats_after=%0d gated=%0d ungated=%0d",
             wakes, logged_ok, stores, recalls, shares, adc_off, stalls, losts, beats_after, gated, ungated);
    check(wakes >= 14, "CPU woken every second");
    check(logged_ok >= 3, "heart rate logged");
    check(stores >= 14 && recalls >= 14, "store and recall on every sleep/wake");
    check(shares > 0, "plate-line charge sharing");
    check(adc_off > 0, "ADC slept between beats");
    check(stalls > 0, "detector engine stalled by sample writes");
    check(losts > 0, "lock lost without QRS");
    check(beats_after >= 3, "lock regained");
    check(gated > 0 && ungated > 0, "bridge clock gated and ungated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the 24 MHz domain must not stay powered for long (normally off)
  int on_run = 0;
  always @(posedge clk32) begin
    on_run = osc24_en ? on_run + 1 : 0;
    if (on_run > 2000) begin
      failures++;
      $display("FAIL: 24 MHz domain stuck on");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #(64'd30518 * 64'(NSAMP + 64) * 64'd256);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
