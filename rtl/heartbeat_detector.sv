// Noise-tolerant heartbeat (QRS) detector of the 32.768 kHz always-on domain.
//
// Filtered ECG samples (128 samples/s) are written into a 1024-entry dual-port
// sample buffer addressed by the low bits of a sample-time counter. One shared
// multiply-accumulate engine then runs three kinds of correlation job:
//   coarse  eq. (1)-(4): for T_shift = 35..192 samples it sums, over the 1.5 s
//           window i = 0..192, W2(i) * d[tn-i] * d[tn-i-T_shift], scales the
//           sum by W1(T_shift)^2 and keeps the T_shift of the largest value as
//           the instantaneous heart-rate interval IHR.
//   fine    eq. (5)-(6): for T' = 0..192 it correlates a 0.1 s small window
//           ending at tn-T' with the same window one IHR earlier; the best T'
//           locates the nearest QRS, t_QRS = tn - T' - 6 (centre of the window).
//   match   template matching: the QRS is expected one IHR after the last one,
//           within +-25 % of IHR. Each candidate centre c in that window is
//           scored by sum_j TM[j] * d[c+j-6], j = 0..12; the best c is the beat.
// After the fine search the 13-sample template TM is loaded from the buffer
// (eq. 7); after each match it is updated as TM = (7*TM + d)/8 (eq. 8). The
// interval to the new beat becomes the next IHR. Between beats the detector
// drops adc_en until WAKE_MARGIN samples before the next search window, so the
// ADC and filter sleep. A match whose score is not positive or falls below a
// quarter of the previous match score is treated as lost lock: the detector
// keeps the ADC on and restarts with a fresh coarse search.
//
// Timing: the engine does one multiply-accumulate per clock through a
// three-stage pipeline (address, RAM read, accumulate/compare). A sample write
// takes sample-buffer port A; a coarse or fine read that needs port A in the
// same cycle stalls for one cycle. At 32.768 kHz a coarse search (158 x 193
// products) takes about 0.95 s, a fine search 0.08 s and a match a few ms.
//
// Interface: smp_tick marks each new sample period (the time counter advances),
// smp_valid/smp_data deliver that period's filtered sample when the ADC was on.
// hb_valid pulses for each detected beat with its time hb_tqrs, the interval
// hb_ihr (samples) and its correlation score.
//
// From the document: the equations, window lengths, weights, the 25 % beat
// variation, the template update, the shared engine on dual-port SRAMs and the
// sleep of ADC and detector between predicted beats. This design's choices:
// buffer depth, widths, the pipeline, the stall rule, t_QRS at the centre of the
// small window, the lost-lock rule and WAKE_MARGIN.
module heartbeat_detector
  import hbd_pkg::*;
#(
  parameter int unsigned WAKE_MARGIN = 8,   // samples of ADC/filter warm-up
  parameter int unsigned LOST_DIV    = 4    // lost when score*LOST_DIV < previous
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       smp_tick,
  input  logic       smp_valid,
  input  sample_t    smp_data,
  output logic       adc_en,
  output logic       hb_valid,
  output stime_t     hb_tqrs,
  output logic [8:0] hb_ihr,
  output acc_t       hb_score,
  output logic       lost,      // one-cycle pulse on lost lock
  output hbd_state_e state
);
  localparam int unsigned FILL_NEED = LW + LSW + TSH_MAX + 1;
  localparam int unsigned HALF      = LSW / 2;

  // ---------------- sample time and buffer write ----------------
  stime_t t_now;         // time of the current sample period
  stime_t t_last;        // time of the newest buffered sample
  logic [9:0] fill;      // consecutive buffered samples since restart

  // ---------------- engine job registers ----------------
  corr_mode_e mode;
  logic       issuing;
  logic [8:0] k, k_end;  // outer index (T_shift, T' or candidate offset)
  logic [8:0] i, i_end;  // inner index
  stime_t     tn;        // reference time of coarse/fine
  stime_t     wstart;    // first candidate centre of a match
  logic [8:0] ihr;       // current beat interval (samples)
  stime_t     tq;        // time of the last detected QRS
  acc_t       prev_score;

  // pipeline stage 1 -> 2 (RAM outputs valid in stage 2)
  logic       v2, first2, last2;
  logic [8:0] k2;
  logic [2:0] w2_2;
  // stage 2 -> 3
  logic       v3;
  logic [8:0] k3;
  acc_t       acc, score3;
  // best result of the job
  acc_t       best;
  logic [8:0] best_k;
  logic       best_set;

  // RAM signals
  logic            sa_en, sa_we, sb_en;
  logic [ABW-1:0]  sa_addr, sb_addr;
  sample_t         sa_rdata, sb_rdata;
  logic            ta_en, ta_we, tb_en;
  logic [3:0]      ta_addr, tb_addr;
  sample_t         ta_wdata, ta_rdata, tb_rdata;

  logic stall, issue;
  logic need_port_a;
  stime_t a_time, b_time;

  hbd_dpram #(.DEPTH(1 << ABW), .WIDTH(DW)) u_smp (
    .clk, .a_en(sa_en), .a_we(sa_we), .a_addr(sa_addr), .a_wdata(smp_data),
    .a_rdata(sa_rdata), .b_en(sb_en), .b_addr(sb_addr), .b_rdata(sb_rdata));

  hbd_dpram #(.DEPTH(16), .WIDTH(DW)) u_tm (
    .clk, .a_en(ta_en), .a_we(ta_we), .a_addr(ta_addr), .a_wdata(ta_wdata),
    .a_rdata(ta_rdata), .b_en(tb_en), .b_addr(tb_addr), .b_rdata(tb_rdata));

  // ---------------- template load/update sequencer ----------------
  logic       tm_init;    // 1: eq. (7) copy, 0: eq. (8) blend
  logic [3:0] tj;         // template index
  logic       tphase;     // 0: read, 1: write

  // ---------------- address generation ----------------
  always_comb begin
    need_port_a = issuing && (mode != M_MATCH);
    unique case (mode)
      M_COARSE: begin
        a_time = tn - stime_t'(i);
        b_time = tn - stime_t'(i) - stime_t'(k);
      end
      M_FINE: begin
        a_time = tn - stime_t'(i) - stime_t'(k);
        b_time = tn - stime_t'(i) - stime_t'(k) - stime_t'(ihr);
      end
      default: begin
        a_time = '0;
        b_time = wstart + stime_t'(k) + stime_t'(HALF) - stime_t'(i);
      end
    endcase
    if (state == S_TM_INIT || state == S_TM_UPD)
      b_time = tq - stime_t'(HALF) + stime_t'(tj);
  end

  assign stall = smp_valid && need_port_a;
  assign issue = issuing && !stall;

  always_comb begin
    sa_en   = smp_valid || (issue && mode != M_MATCH);
    sa_we   = smp_valid;
    sa_addr = smp_valid ? t_now[ABW-1:0] : a_time[ABW-1:0];
    sb_en   = issue || ((state == S_TM_INIT || state == S_TM_UPD) && !tphase);
    sb_addr = b_time[ABW-1:0];
    tb_en   = (issue && mode == M_MATCH) || (state == S_TM_UPD && !tphase);
    tb_addr = (state == S_TM_UPD) ? tj : 4'(LSW - i);
    ta_en   = (state == S_TM_INIT || state == S_TM_UPD) && tphase;
    ta_we   = ta_en;
    ta_addr = tj;
    ta_wdata = tm_init ? sb_rdata : blend(tb_rdata, sb_rdata);
  end

  function automatic sample_t blend(input sample_t prev, input sample_t d);
    logic signed [DW+3:0] s;
    s = (DW+4)'(prev) * 7 + (DW+4)'(d);
    return sample_t'(s >>> 3);
  endfunction

  // ---------------- multiply-accumulate ----------------
  sample_t    mul_a;
  acc_t       prod, wprod, acc_next;
  assign mul_a    = (mode == M_MATCH) ? tb_rdata : sa_rdata;
  assign prod     = acc_t'(mul_a) * acc_t'(sb_rdata);
  assign wprod    = (mode == M_COARSE) ? prod * acc_t'(w2_2) : prod;
  assign acc_next = first2 ? wprod : acc + wprod;

  // ---------------- control ----------------
  logic [8:0] ihr_q;     // quarter of the interval (25 % beat variation)
  stime_t     pred;
  stime_t     wake_t;
  logic [8:0] interval;
  stime_t     c_best;
  assign ihr_q    = ihr >> 2;
  assign pred     = tq + stime_t'(ihr);
  assign c_best   = wstart + stime_t'(best_k);
  assign interval = 9'(c_best - tq);
  assign wake_t   = pred - stime_t'(ihr_q) - stime_t'(HALF) - stime_t'(WAKE_MARGIN);

  function automatic logic after_eq(input stime_t a, input stime_t b);
    logic [TW-1:0] diff;
    diff = a - b;
    return !diff[TW-1];   // a >= b in wrap-around time
  endfunction

  function automatic logic [8:0] clamp_ihr(input logic [8:0] v);
    if (v < 9'(TSH_MIN))      return 9'(TSH_MIN);
    else if (v > 9'(TSH_MAX)) return 9'(TSH_MAX);
    else                      return v;
  endfunction

  logic job_done;
  assign job_done = !issuing && !v2 && !v3 &&
                    (state == S_COARSE || state == S_FINE || state == S_MATCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_now <= '0; t_last <= '0; fill <= '0;
      state <= S_FILL; mode <= M_COARSE; issuing <= 1'b0;
      k <= '0; k_end <= '0; i <= '0; i_end <= '0;
      tn <= '0; wstart <= '0; ihr <= 9'(TSH_MIN); tq <= '0; prev_score <= '0;
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0; k2 <= '0; w2_2 <= '0;
      v3 <= 1'b0; k3 <= '0; acc <= '0; score3 <= '0;
      best <= '0; best_k <= '0; best_set <= 1'b0;
      tm_init <= 1'b1; tj <= '0; tphase <= 1'b0;
      adc_en <= 1'b1; hb_valid <= 1'b0; hb_tqrs <= '0; hb_ihr <= '0;
      hb_score <= '0; lost <= 1'b0;
    end else begin
      hb_valid <= 1'b0;
      lost     <= 1'b0;

      // sample time and buffer fill
      if (smp_tick) t_now <= t_now + 1'b1;
      if (smp_valid) begin
        t_last <= t_now;
        if (fill != 10'(FILL_NEED)) fill <= fill + 1'b1;
      end

      // stage 1: issue
      v2 <= issue;
      if (issue) begin
        first2 <= (i == 0);
        last2  <= (i == i_end);
        k2     <= k;
        w2_2   <= w2q(i);
        if (i == i_end) begin
          i <= '0;
          if (k == k_end) issuing <= 1'b0;
          else            k <= k + 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
      // stage 2: accumulate
      v3 <= v2 && last2;
      if (v2) begin
        acc <= acc_next;
        if (last2) begin
          k3     <= k2;
          score3 <= (mode == M_COARSE) ? acc_next * acc_t'(w1sq(k2)) : acc_next;
        end
      end
      // stage 3: arg max (first maximum wins)
      if (v3 && (!best_set || score3 > best)) begin
        best     <= score3;
        best_k   <= k3;
        best_set <= 1'b1;
      end

      unique case (state)
        S_FILL: begin
          adc_en <= 1'b1;
          if (fill == 10'(FILL_NEED)) begin
            tn       <= t_last;
            mode     <= M_COARSE;
            k        <= 9'(TSH_MIN);
            k_end    <= 9'(TSH_MAX);
            i        <= '0;
            i_end    <= 9'(LW);
            issuing  <= 1'b1;
            best_set <= 1'b0;
            state    <= S_COARSE;
          end
        end
        S_COARSE: if (job_done) begin
          ihr      <= best_k;
          mode     <= M_FINE;
          k        <= '0;
          k_end    <= 9'(LW);
          i        <= '0;
          i_end    <= 9'(LSW);
          issuing  <= 1'b1;
          best_set <= 1'b0;
          state    <= S_FINE;
        end
        S_FINE: if (job_done) begin
          tq    <= tn - stime_t'(best_k) - stime_t'(HALF);
          state <= S_TM_WAIT;
        end
        S_TM_WAIT: if (after_eq(t_last, tq + stime_t'(HALF))) begin
          tm_init    <= 1'b1;
          tj         <= '0;
          tphase     <= 1'b0;
          prev_score <= '0;
          state      <= S_TM_INIT;
        end
        S_TM_INIT, S_TM_UPD: begin
          tphase <= !tphase;
          if (tphase) begin
            if (tj == 4'(LSW)) begin
              hb_valid <= 1'b1;
              hb_tqrs  <= tq;
              hb_ihr   <= ihr;
              hb_score <= prev_score;
              wstart   <= pred - stime_t'(ihr_q);
              if (!after_eq(t_now, wake_t)) begin
                adc_en <= 1'b0;
                state  <= S_SLEEP;
              end else begin
                state  <= S_WAIT_WIN;
              end
            end else begin
              tj <= tj + 1'b1;
            end
          end
        end
        S_SLEEP: if (after_eq(t_now, wake_t)) begin
          adc_en <= 1'b1;
          state  <= S_WAIT_WIN;
        end
        S_WAIT_WIN: if (after_eq(t_last, wstart + stime_t'(2 * ihr_q) + stime_t'(HALF))) begin
          mode     <= M_MATCH;
          k        <= '0;
          k_end    <= 2 * ihr_q;
          i        <= '0;
          i_end    <= 9'(LSW);
          issuing  <= 1'b1;
          best_set <= 1'b0;
          state    <= S_MATCH;
        end
        S_MATCH: if (job_done) begin
          if (best <= 0 || acc_t'(best * acc_t'(LOST_DIV)) < prev_score) begin
            lost   <= 1'b1;
            adc_en <= 1'b1;
            fill   <= '0;
            state  <= S_FILL;
          end else begin
            ihr        <= clamp_ihr(interval);
            tq         <= c_best;
            prev_score <= best;
            tm_init    <= 1'b0;
            tj         <= '0;
            tphase     <= 1'b0;
            state      <= S_TM_UPD;
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end

  // hb_ihr reports the measured interval; the clamped value drives prediction
  // (the clamp only matters outside 0.27 s .. 1.5 s).
endmodule
