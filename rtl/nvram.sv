// 16 KB non-volatile RAM of the NVMCU: the controller plus eight 2 KB 6T-4C
// macros (behavioural models). Interface and timing are those of nvram_ctrl:
// one-clock read/write of 32-bit words, four-phase store/recall requests,
// 128 clocks per store or recall. `vdd` is the switched supply of the 24 MHz
// domain; the ferroelectric copy survives while it is off.
module nvram
  import nvram_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vdd,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  input  logic [3:0]    be,
  output logic [31:0]   rdata,
  output logic          ready,
  input  logic          store_req,
  output logic          store_ack,
  input  logic          recall_req,
  output logic          recall_ack
);
  logic [N_MACRO-1:0] m_ce, m_bl_eq;
  logic               m_we;
  logic [MAW-1:0]     m_addr;
  logic [31:0]        m_wdata;
  logic [3:0]         m_be;
  logic [31:0]        m_rdata [N_MACRO];
  pl_cmd_t            m_pl;

  nvram_ctrl u_ctrl (.*);

  for (genvar m = 0; m < N_MACRO; m++) begin : g_macro
    nvram_macro u_macro (
      .clk, .vdd, .ce(m_ce[m]), .we(m_we), .addr(m_addr), .wdata(m_wdata),
      .be(m_be), .rdata(m_rdata[m]), .bl_eq(m_bl_eq[m]), .pl(m_pl));
  end
endmodule
