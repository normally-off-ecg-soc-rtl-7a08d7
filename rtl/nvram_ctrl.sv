// Controller of the 16 KB non-volatile RAM in the 24 MHz NVMCU domain.
//
// Normal access: the CPU side presents req/we/addr/wdata/be; the word address
// selects one of eight 2 KB macros (top 3 bits) and a word in it. Only that
// macro is enabled, for one clock; its bit-line equalizer is switched off for
// that clock and is on otherwise (bit-line non-precharge: the bit lines are only
// equalized between accesses). Read data and ready follow one clock later.
//
// Store and recall: requested by the always-on power controller with a
// four-phase req/ack handshake (the requests are synchronized here). All eight
// macros step through their 128 rows in parallel, one row per clock, so either
// operation takes 128 clocks for the whole 16 KB. On each row after the first
// the plate-line charge of the previous row is shared through SW_PL before the
// driver tops it up. A store pulses PLA and PLB, a recall PLA only. The CPU
// side is not served (ready stays low) while a store or recall runs. The
// write enable, word address, write data and byte enables go to all macros
// unregistered, straight from the CPU bus; only the enabled macro acts on them.
//
// From the document: 8 macros of 128 x 128, row-sequential store/recall in 128
// cycles, plate-line charge sharing, equalize-only bit lines. This design's
// choices: the word organisation, the one-cycle access timing, the handshake.
module nvram_ctrl
  import nvram_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU side
  input  logic                 req,
  input  logic                 we,
  input  logic [AW-1:0]        addr,     // 32-bit word address
  input  logic [31:0]          wdata,
  input  logic [3:0]           be,
  output logic [31:0]          rdata,
  output logic                 ready,
  // power controller side (asynchronous, four-phase)
  input  logic                 store_req,
  output logic                 store_ack,
  input  logic                 recall_req,
  output logic                 recall_ack,
  // macros
  output logic [N_MACRO-1:0]   m_ce,
  output logic                 m_we,
  output logic [MAW-1:0]       m_addr,
  output logic [31:0]          m_wdata,
  output logic [3:0]           m_be,
  input  logic [31:0]          m_rdata [N_MACRO],
  output logic [N_MACRO-1:0]   m_bl_eq,
  output pl_cmd_t              m_pl
);
  typedef enum logic [1:0] {C_IDLE, C_STORE, C_RECALL, C_ACK} ctrl_state_e;
  ctrl_state_e cs;
  logic [RAW-1:0] row;
  logic [1:0] st_sync, rc_sync;
  logic [2:0] rd_sel;
  logic       access;

  assign access  = req && cs == C_IDLE && !ready;
  assign m_we    = we;
  assign m_addr  = addr[MAW-1:0];
  assign m_wdata = wdata;
  assign m_be    = be;

  always_comb begin
    for (int m = 0; m < N_MACRO; m++) begin
      m_ce[m]    = access && addr[AW-1:MAW] == 3'(m);
      m_bl_eq[m] = !m_ce[m];
    end
    m_pl.step  = (cs == C_STORE) || (cs == C_RECALL);
    m_pl.row   = row;
    m_pl.drv_a = m_pl.step;
    m_pl.drv_b = (cs == C_STORE);
    m_pl.share = m_pl.step && row != '0;
    rdata      = m_rdata[rd_sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= C_IDLE; row <= '0; st_sync <= '0; rc_sync <= '0;
      store_ack <= 1'b0; recall_ack <= 1'b0;
    end else begin
      st_sync <= {st_sync[0], store_req};
      rc_sync <= {rc_sync[0], recall_req};
      ready   <= access;
      if (access) rd_sel <= addr[AW-1:MAW];
      unique case (cs)
        C_IDLE: begin
          if (!st_sync[1]) store_ack <= 1'b0;
          if (!rc_sync[1]) recall_ack <= 1'b0;
          if (st_sync[1] && !store_ack && !ready) begin
            cs <= C_STORE; row <= '0;
          end else if (rc_sync[1] && !recall_ack && !ready) begin
            cs <= C_RECALL; row <= '0;
          end
        end
        C_STORE, C_RECALL: begin
          row <= row + 1'b1;
          if (row == RAW'(ROWS - 1)) begin
            if (cs == C_STORE) store_ack <= 1'b1;
            else               recall_ack <= 1'b1;
            cs <= C_ACK;
          end
        end
        default: cs <= C_IDLE;   // C_ACK: one idle clock after an operation
      endcase
    end
  end
endmodule
