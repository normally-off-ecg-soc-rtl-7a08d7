// Testbench of the low-speed bus bridge with a 24 MHz-like fast clock and a
// slow clock 61 times slower (so the clocks have no fixed phase relation). A
// register file of 16 words on the slow side is written and read back through
// the bridge in random order and compared with a reference copy. Checked: read
// data, that each access reaches the slow side exactly once, a latency of at
// most 7 slow clocks, and that the gated fast clock does not toggle while the
// bus is idle.
module tb_lsbus_bridge;
  logic hclk = 0, hrst_n = 0, lclk = 0, lrst_n = 0;
  logic sel = 0, write = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic ready, gclk_en;
  logic l_acc, l_write;
  logic [7:0] l_addr;
  logic [31:0] l_wdata, l_rdata;
  int checks = 0, failures = 0;
  logic [31:0] regs [16];
  logic [31:0] ref_regs [16];

  lsbus_bridge dut (.*);
  always #21 hclk = ~hclk;
  always #1281 lclk = ~lclk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // slow-side register file
  int l_accesses = 0;
  assign l_rdata = regs[l_addr[3:0]];
  always @(posedge lclk) if (l_acc) begin
    l_accesses++;
    if (l_write) regs[l_addr[3:0]] <= l_wdata;
  end

  // gated clock edges while idle
  int idle_edges = 0;
  bit idle = 0;   // counted from the end of reset
  always @(posedge dut.gclk) if (idle) idle_edges++;

  task automatic xfer(input bit w, input int a, input logic [31:0] d, output logic [31:0] q);
    int n0, t0;
    n0 = l_accesses;
    t0 = $time;
    @(negedge hclk);
    idle = 0;
    sel = 1; write = w; addr = 8'(a); wdata = d;
    do @(negedge hclk); while (!ready);
    q = rdata;
    sel = 0;
    @(negedge hclk);
    @(negedge hclk);
    idle = 1;
    chk(l_accesses == n0 + 1, $sformatf("one slow-side access per transfer: %0d", l_accesses - n0));
    chk($time - t0 <= 7 * 2562, $sformatf("latency %0t", $time - t0));
  endtask

  initial begin
    logic [31:0] q, d;
    for (int k = 0; k < 16; k++) begin regs[k] = 0; ref_regs[k] = 0; end
    repeat (3) @(posedge lclk);
    hrst_n = 1; lrst_n = 1;
    @(negedge hclk);
    idle = 1;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = int'($urandom_range(15));
      if ($urandom_range(1)) begin
        d = $urandom;
        xfer(1, a, d, q);
        ref_regs[a] = d;
      end else begin
        xfer(0, a, 0, q);
        chk(q == ref_regs[a], $sformatf("read %0d: %h vs %h", a, q, ref_regs[a]));
      end
      repeat ($urandom_range(40)) @(negedge hclk);
    end
    chk(idle_edges == 0, $sformatf("%0d gated clock edges while idle", idle_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
