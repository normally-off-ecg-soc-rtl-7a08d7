// Self-checking testbench of the heartbeat detector. It plays a synthetic,
// already filtered ECG (a fixed 13-sample biphasic QRS shape plus uniform noise)
// at one sample per 256 clocks, acting as the ADC: a sample is delivered only
// while adc_en is high. The beat schedule is: period 100 samples, then 110
// (a 10 % change inside the 25 % prediction window), then a stretch with no
// QRS at all (noise only), then period 80. Checked against the schedule:
//  - the first beat after each acquisition reports an IHR within 2 samples of
//    the true period and lies within 4 samples of a true QRS,
//  - every matched beat reports the true interval (+-1) and keeps the same
//    offset (+-1) to the true QRS as the acquisition,
//  - lock is lost during the QRS-free stretch and regained afterwards,
//  - the ADC is switched off between beats, sample writes stall the engine,
//  - a coarse search lasts 158 x 193 cycles plus stalls, less than one second
//    at 32.768 kHz.
module tb_heartbeat_detector;
  import hbd_pkg::*;
  localparam int NT = 9000;
  localparam int NB = 200;

  logic clk = 0, rst_n = 0;
  logic smp_tick = 0, smp_valid = 0;
  sample_t smp_data = '0;
  logic adc_en, hb_valid, lost;
  stime_t hb_tqrs;
  logic [8:0] hb_ihr;
  acc_t hb_score;
  hbd_state_e state;

  heartbeat_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sig [NT];
  int q [NB];
  int amp [NB];
  int nq;
  int shape [13] = '{0, 4, 12, 30, 62, 95, 70, -20, -85, -70, -30, -8, 0};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // build the signal
  initial begin
    int m, t;
    for (t = 0; t < NT; t++) sig[t] = int'($urandom_range(10)) - 5;
    q[0] = 50; amp[0] = 1; nq = 1;
    while (q[nq-1] < NT - 120) begin
      int p;
      p = (q[nq-1] < 2400) ? 100 : (q[nq-1] < 4200) ? 110 : (q[nq-1] < 6000) ? 100 : 80;
      q[nq] = q[nq-1] + p;
      amp[nq] = (q[nq] >= 4200 && q[nq] < 6000) ? 0 : 1;
      nq++;
    end
    for (m = 0; m < nq; m++)
      if (amp[m] != 0)
        for (int j = 0; j < 13; j++)
          if (q[m] - 6 + j < NT) sig[q[m] - 6 + j] += shape[j];
  end

  // ADC model: a sample each 256 clocks while adc_en is high
  int t_tb = 0;
  int sleep_ticks = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      smp_tick <= 1;
      @(posedge clk);
      smp_tick <= 0;
      t_tb++;
      if (adc_en) begin
        repeat (10) @(posedge clk);
        smp_valid <= 1;
        smp_data  <= sample_t'((sig[t_tb] > 127) ? 127 : (sig[t_tb] < -128) ? -128 : sig[t_tb]);
        @(posedge clk);
        smp_valid <= 0;
        repeat (244) @(posedge clk);
      end else begin
        sleep_ticks++;
        repeat (255) @(posedge clk);
      end
      if (t_tb >= NT - 10) begin
        finish_tb();
      end
    end
  end

  // statistics from inside the detector
  int stalls = 0, coarse_runs = 0, updates = 0, losts = 0, beats = 0;
  int coarse_cyc = 0, coarse_stalls = 0;
  hbd_state_e st_q;
  always @(posedge clk) if (rst_n) begin
    st_q <= state;
    if (dut.stall) stalls++;
    if (state == S_COARSE) begin
      coarse_cyc++;
      if (dut.stall) coarse_stalls++;
    end
    if (st_q == S_COARSE && state != S_COARSE) begin
      coarse_runs++;
      check(coarse_cyc >= 158*193 + coarse_stalls && coarse_cyc <= 158*193 + coarse_stalls + 8,
            $sformatf("coarse search took %0d cycles with %0d stalls", coarse_cyc, coarse_stalls));
      check(coarse_cyc < 32768, "coarse search within 1 s at 32.768 kHz");
      coarse_cyc = 0; coarse_stalls = 0;
    end
    if (st_q != S_TM_UPD && state == S_TM_UPD) updates++;
    if (lost) losts++;
  end

  // beat checks
  bit have_lock = 0;
  int lock_off = 0;
  int reacq_ok = 0;
  always @(posedge clk) if (hb_valid) begin
    int m, best_m, off, tq_i, per;
    tq_i = int'(hb_tqrs);
    best_m = 0;
    for (m = 0; m < nq; m++)
      if ((q[m] - tq_i) * (q[m] - tq_i) < (q[best_m] - tq_i) * (q[best_m] - tq_i)) best_m = m;
    off = tq_i - q[best_m];
    per = (best_m > 0) ? q[best_m] - q[best_m-1] : 100;
    beats++;
    // only judge beats whose neighbourhood is fully inside a QRS stretch
    if (amp[best_m] != 0 && best_m > 0 && amp[best_m-1] != 0 &&
        !(tq_i >= 4000 && tq_i < 6900)) begin
      if (!have_lock || dut.tm_init) begin
        check(off >= -4 && off <= 4, $sformatf("acquired beat %0d off by %0d", tq_i, off));
        check(int'(hb_ihr) >= per - 2 && int'(hb_ihr) <= per + 2,
              $sformatf("coarse IHR %0d, period %0d", hb_ihr, per));
        lock_off = off;
        have_lock = 1;
      end else begin
        check(off >= lock_off - 1 && off <= lock_off + 1,
              $sformatf("beat at %0d offset %0d, lock offset %0d", tq_i, off, lock_off));
        check(int'(hb_ihr) >= per - 1 && int'(hb_ihr) <= per + 1,
              $sformatf("IHR %0d at %0d, period %0d", hb_ihr, tq_i, per));
        if (tq_i > 6900) reacq_ok++;
      end
    end
    if (tq_i >= 4000 && tq_i < 6900) have_lock = 0;
  end

  task automatic finish_tb();
    $display("beats=%0d coarse=%0d updates=%0d lost=%0d stalls=%0d sleep_ticks=%0d",
             beats, coarse_runs, updates, losts, stalls, sleep_ticks);
    check(updates >= 30, "template updated on matched beats");
    check(losts >= 1, "lock lost in the QRS-free stretch");
    check(coarse_runs >= 2, "coarse search rerun after lost lock");
    check(reacq_ok >= 5, "beats matched after reacquisition");
    check(stalls > 0, "sample writes stalled the engine");
    check(sleep_ticks > 1000, "ADC slept between beats");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (NT * 256 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
