// Testbench of the NVRAM controller with simple macro stand-ins (one word
// register per macro, enough to see which macro answers). Checked: exactly one
// macro is enabled per access, chosen by the top address bits, with its
// bit-line equalizer off for that clock and on otherwise; ready and read data
// follow one clock later; a store request produces 128 consecutive plate-line
// steps over rows 0..127 with both plate lines and charge sharing on every row
// after the first, then the acknowledge; a recall does the same with PLA only;
// the four-phase handshake completes; CPU accesses wait during a store.
module tb_nvram_ctrl;
  import nvram_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] be = '0;
  logic ready;
  logic store_req = 0, store_ack, recall_req = 0, recall_ack;
  logic [N_MACRO-1:0] m_ce, m_bl_eq;
  logic m_we;
  logic [MAW-1:0] m_addr;
  logic [31:0] m_wdata;
  logic [3:0] m_be;
  logic [31:0] m_rdata [N_MACRO];
  pl_cmd_t m_pl;
  int checks = 0, failures = 0;

  nvram_ctrl dut (.*);
  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // macro stand-ins: macro m returns {m, address} of its last access
  always @(posedge clk)
    for (int m = 0; m < N_MACRO; m++)
      if (m_ce[m]) m_rdata[m] <= {8'(m), 15'd0, m_addr};

  // per-clock rules
  int ce_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (m_bl_eq != ~m_ce) begin failures++; $display("FAIL: equalizer %b vs ce %b", m_bl_eq, m_ce); end
    if (m_ce != 0) begin
      ce_cycles++;
      chk($onehot(m_ce), "one macro per access");
      chk(!m_pl.step, "no access during store/recall");
    end
  end

  task automatic access(input int a, input bit w);
    int lat;
    @(negedge clk);
    req = 1; we = w; addr = AW'(a); wdata = $urandom; be = 4'hf;
    #1;
    chk(m_ce == N_MACRO'(1) << (a >> MAW), $sformatf("decode of %0d: %b", a, m_ce));
    lat = 0;
    do begin @(negedge clk); lat++; end while (!ready);
    req = 0;
    chk(lat == 1, $sformatf("access latency %0d", lat));
    if (!w) chk(rdata == {8'(a >> MAW), 15'd0, MAW'(a)}, $sformatf("read data %h", rdata));
  endtask

  task automatic nv_op(input bit store);
    int steps;
    @(negedge clk);
    if (store) store_req = 1; else recall_req = 1;
    steps = 0;
    while (!(store ? store_ack : recall_ack)) begin
      @(negedge clk);
      if (m_pl.step) begin
        chk(int'(m_pl.row) == steps, $sformatf("row %0d at step %0d", m_pl.row, steps));
        chk(m_pl.drv_a && m_pl.drv_b == store, "plate lines driven");
        chk(m_pl.share == (steps != 0), "charge share on rows after the first");
        steps++;
      end
    end
    chk(steps == ROWS, $sformatf("%0d steps", steps));
    if (store) store_req = 0; else recall_req = 0;
    repeat (6) @(negedge clk);
    chk(!store_ack && !recall_ack, "handshake released");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) access(int'($urandom_range(4095)), 1'($urandom_range(1)));
    nv_op(1);
    nv_op(0);
    // access requested while a store is starting must wait for it
    fork
      nv_op(1);
      begin
        repeat (5) @(negedge clk);
        req = 1; we = 0; addr = 12'd5;
        while (!ready) @(negedge clk);
        req = 0;
        chk(!m_pl.step, "access served after the store");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
