// Low-speed bus bridge between the 24 MHz NVMCU domain and the 32.768 kHz
// always-on domain. The CPU side is a simple request/ready bus (APB-like:
// sel with write, address and data held until ready). The request crosses to
// the slow domain as a toggle through a two-flip-flop synchronizer; there the
// access is performed in one slow clock (acc pulse to the register block, read
// data captured) and an acknowledge toggle crosses back, after which ready
// pulses for one fast clock with the read data.
//
// The fast-side registers run on a gated clock that is enabled only by the bus
// control signals (sel, or a transfer in flight), so they draw no clock power
// while the bus is idle. A transfer costs a few slow clocks (about 100 us).
//
// From the document: synchronization of the slow domain at the low-speed bus,
// and gating the 24 MHz clock with the bus control signals. The protocol and
// the toggle handshake are this design's choice.
module lsbus_bridge #(
  parameter int unsigned AW = 8
) (
  // 24 MHz side
  input  logic          hclk,
  input  logic          hrst_n,
  input  logic          sel,
  input  logic          write,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic          ready,
  output logic          gclk_en,    // gating enable (observable)
  // 32 kHz side
  input  logic          lclk,
  input  logic          lrst_n,
  output logic          l_acc,      // one-clock access strobe
  output logic          l_write,
  output logic [AW-1:0] l_addr,
  output logic [31:0]   l_wdata,
  input  logic [31:0]   l_rdata
);
  logic gclk;
  logic [2:0]  req_sync;
  logic        l_ack_t;
  logic [31:0] l_rdata_q;
  logic busy, req_t, ack_t_seen;
  logic [1:0] ack_sync;
  logic [AW-1:0] addr_q;
  logic [31:0]   wdata_q;
  logic          write_q;

  assign gclk_en = sel || busy || ready;
  clock_gate u_cg (.clk(hclk), .en(gclk_en), .gclk);

  // fast side, on the gated clock
  always_ff @(posedge gclk or negedge hrst_n) begin
    if (!hrst_n) begin
      busy <= 1'b0; req_t <= 1'b0; ack_sync <= '0; ack_t_seen <= 1'b0;
      addr_q <= '0; wdata_q <= '0; write_q <= 1'b0; ready <= 1'b0; rdata <= '0;
    end else begin
      ready    <= 1'b0;
      ack_sync <= {ack_sync[0], l_ack_t};
      if (!busy) begin
        if (sel && !ready) begin
          busy    <= 1'b1;
          req_t   <= !req_t;
          addr_q  <= addr;
          wdata_q <= wdata;
          write_q <= write;
        end
      end else if (ack_sync[1] != ack_t_seen) begin
        ack_t_seen <= ack_sync[1];
        busy       <= 1'b0;
        ready      <= 1'b1;
        rdata      <= l_rdata_q;
      end
    end
  end

  // slow side
  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      req_sync <= '0; l_ack_t <= 1'b0; l_acc <= 1'b0; l_rdata_q <= '0;
    end else begin
      req_sync <= {req_sync[1:0], req_t};
      l_acc    <= 1'b0;
      if (req_sync[1] != req_sync[2] && !l_acc) l_acc <= 1'b1;
      if (l_acc) begin
        l_rdata_q <= l_rdata;
        l_ack_t   <= req_sync[2];
      end
    end
  end
  // address, data and direction are stable while the request toggle crosses
  assign l_addr  = addr_q;
  assign l_wdata = wdata_q;
  assign l_write = write_q;
endmodule
