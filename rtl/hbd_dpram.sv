// Dual-port SRAM of the heartbeat detector, written as an array. The detector
// uses one instance as the ECG sample ring buffer and one as the QRS template
// store. Port A reads or writes, port B only reads; both have a registered read
// (data appears the cycle after the address). A read of the address being
// written on port A in the same cycle returns the old word (read-before-write).
// The document only says the detector is built from dual-port SRAMs; depth,
// width and this read/write arrangement are this design's choice.
module hbd_dpram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
