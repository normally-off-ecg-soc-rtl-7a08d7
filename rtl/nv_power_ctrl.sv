// Power controller of the always-on 32.768 kHz domain for normally-off
// operation of the NVMCU. The 24 MHz domain (CPU, NVRAM, 24 MHz oscillator) is
// normally unpowered. A wake-up request (e.g. the timer's logging tick) powers
// it up, recalls the NVRAM and then the CPU's non-volatile flip-flops, releases
// isolation and reset, and passes the interrupt to the CPU. When the CPU enters
// deep sleep, the NVRAM and then the flip-flops store their state, the domain
// is isolated and reset, and its supply and oscillator are switched off.
//
// The store and recall requests are four-phase handshakes (req up, wait ack
// up, req down, wait ack down); acks and the deep-sleep flag come from the 24
// MHz domain and are synchronized here with two flip-flops. Isolation clamps
// them to 0 while the domain is off. After reset the domain is brought up once
// without a recall (cold boot). PWRUP_CYC clocks are allowed for the supply and
// the 24 MHz oscillator to settle.
//
// From the document: the sequence of Fig. 3 (store before power-off, recall on
// an IRQ from the always-on domain, NVRAM and flip-flops one after the other,
// reset and isolation around the off state). This design's choices: the
// handshakes, the cold boot and the settle time.
module nv_power_ctrl #(
  parameter int unsigned PWRUP_CYC = 2
) (
  input  logic clk,            // 32.768 kHz
  input  logic rst_n,
  input  logic wake_req,       // pulse from the always-on domain
  input  logic sleepdeep,      // CPU deep-sleep flag (24 MHz domain)
  output logic vdd_en,         // supply switch of the 24 MHz domain
  output logic osc_en,         // 24 MHz oscillator enable
  output logic iso,            // isolation of the 24 MHz domain outputs
  output logic dom_rst_n,      // reset of the 24 MHz domain logic
  output logic cpu_rst_n,      // reset of the CPU core
  output logic cpu_irq,        // interrupt to the CPU (one clock pulse)
  output logic ram_store_req,
  input  logic ram_store_ack,
  output logic ram_recall_req,
  input  logic ram_recall_ack,
  output logic ff_store_req,
  input  logic ff_store_ack,
  output logic ff_recall_req,
  input  logic ff_recall_ack
);
  typedef enum logic [3:0] {
    P_OFF, P_PWRUP, P_RC_RAM, P_RC_FF, P_RUN, P_ST_RAM, P_ST_FF, P_ISO
  } pwr_state_e;
  pwr_state_e ps;

  logic [1:0] s_sleep, s_st_ram, s_rc_ram, s_st_ff, s_rc_ff;
  logic       cold;          // first power-up: nothing to recall
  logic       irq_pend;
  logic [$clog2(PWRUP_CYC+1)-1:0] cnt;

  // four-phase handshake step: raise req, wait ack, drop req, wait ack low
  function automatic logic hs_done(input logic req, input logic ack);
    return !req && !ack;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_sleep <= '0; s_st_ram <= '0; s_rc_ram <= '0; s_st_ff <= '0; s_rc_ff <= '0;
    end else begin
      s_sleep  <= {s_sleep[0],  sleepdeep      && !iso};
      s_st_ram <= {s_st_ram[0], ram_store_ack  && !iso};
      s_rc_ram <= {s_rc_ram[0], ram_recall_ack && !iso};
      s_st_ff  <= {s_st_ff[0],  ff_store_ack   && !iso};
      s_rc_ff  <= {s_rc_ff[0],  ff_recall_ack  && !iso};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_PWRUP; cold <= 1'b1; irq_pend <= 1'b0; cnt <= '0;
      vdd_en <= 1'b0; osc_en <= 1'b0; iso <= 1'b1; dom_rst_n <= 1'b0;
      cpu_rst_n <= 1'b0; cpu_irq <= 1'b0;
      ram_store_req <= 1'b0; ram_recall_req <= 1'b0;
      ff_store_req <= 1'b0; ff_recall_req <= 1'b0;
    end else begin
      cpu_irq <= 1'b0;
      if (wake_req) irq_pend <= 1'b1;
      unique case (ps)
        P_OFF: if (irq_pend || wake_req) begin
          vdd_en <= 1'b1;
          osc_en <= 1'b1;
          cnt    <= '0;
          ps     <= P_PWRUP;
        end
        P_PWRUP: begin
          vdd_en <= 1'b1;
          osc_en <= 1'b1;
          cnt    <= cnt + 1'b1;
          if (cnt == ($clog2(PWRUP_CYC+1))'(PWRUP_CYC)) begin
            dom_rst_n <= 1'b1;
            iso       <= 1'b0;
            if (cold) begin
              cold <= 1'b0;
              ps   <= P_RUN;
            end else begin
              ram_recall_req <= 1'b1;
              ps             <= P_RC_RAM;
            end
          end
        end
        P_RC_RAM: begin
          if (s_rc_ram[1]) ram_recall_req <= 1'b0;
          if (hs_done(ram_recall_req, s_rc_ram[1])) begin
            ff_recall_req <= 1'b1;
            ps            <= P_RC_FF;
          end
        end
        P_RC_FF: begin
          if (s_rc_ff[1]) ff_recall_req <= 1'b0;
          if (hs_done(ff_recall_req, s_rc_ff[1])) ps <= P_RUN;
        end
        P_RUN: begin
          cpu_rst_n <= 1'b1;
          if (cpu_rst_n && irq_pend) begin
            cpu_irq  <= 1'b1;
            irq_pend <= 1'b0;
          end else if (cpu_rst_n && !cpu_irq && s_sleep[1]) begin
            ram_store_req <= 1'b1;
            ps            <= P_ST_RAM;
          end
        end
        P_ST_RAM: begin
          if (s_st_ram[1]) ram_store_req <= 1'b0;
          if (hs_done(ram_store_req, s_st_ram[1])) begin
            ff_store_req <= 1'b1;
            ps           <= P_ST_FF;
          end
        end
        P_ST_FF: begin
          if (s_st_ff[1]) ff_store_req <= 1'b0;
          if (hs_done(ff_store_req, s_st_ff[1])) begin
            iso       <= 1'b1;
            cpu_rst_n <= 1'b0;
            dom_rst_n <= 1'b0;
            ps        <= P_ISO;
          end
        end
        default: begin   // P_ISO: outputs clamped, then the supply goes off
          vdd_en <= 1'b0;
          osc_en <= 1'b0;
          ps     <= P_OFF;
        end
      endcase
    end
  end
endmodule
