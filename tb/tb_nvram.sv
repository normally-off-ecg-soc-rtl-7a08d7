// Testbench of the 16 KB NVRAM (controller and eight macros). Random data is
// written over the whole address space with random byte enables, read back,
// stored, the supply is switched off (SRAM latches scramble) and on, recalled,
// and every word is read back again. Store and recall must each take 128
// clocks for all 16 KB, and the plate-line drivers must deliver the
// charge-shared amount per macro (store 2x256 + 127x2x128 units).
module tb_nvram;
  import nvram_pkg::*;
  localparam int NW = 1 << AW;
  logic clk = 0, rst_n = 0, vdd = 0;
  logic req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] be = '0;
  logic ready;
  logic store_req = 0, store_ack, recall_req = 0, recall_ack;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [NW];

  nvram dut (.*);
  always #21 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int a, input logic [31:0] d, input logic [3:0] b);
    @(negedge clk);
    req = 1; we = 1; addr = AW'(a); wdata = d; be = b;
    for (int k = 0; k < 4; k++) if (b[k]) ref_mem[a][k*8 +: 8] = d[k*8 +: 8];
    do @(negedge clk); while (!ready);
    req = 0; we = 0;
  endtask
  task automatic rd_check(input int a);
    @(negedge clk);
    req = 1; we = 0; addr = AW'(a);
    do @(negedge clk); while (!ready);
    req = 0;
    chk(rdata == ref_mem[a], $sformatf("word %0d: %h vs %h", a, rdata, ref_mem[a]));
  endtask
  task automatic nv_op(input bit store);
    int cyc;
    @(negedge clk);
    if (store) store_req = 1; else recall_req = 1;
    cyc = 0;
    while (!(store ? store_ack : recall_ack)) begin
      @(negedge clk);
      if (dut.m_pl.step) cyc++;
    end
    chk(cyc == 128, $sformatf("store/recall took %0d clocks", cyc));
    if (store) store_req = 0; else recall_req = 0;
    while (store_ack || recall_ack) @(negedge clk);
  endtask

  initial begin
    longint c0;
    #3 vdd = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NW; a++) wr(a, $urandom, 4'hf);
    for (int n = 0; n < 500; n++) wr(int'($urandom_range(NW - 1)), $urandom, 4'($urandom));
    for (int n = 0; n < 500; n++) rd_check(int'($urandom_range(NW - 1)));
    c0 = dut.g_macro[3].u_macro.drv_charge;
    nv_op(1);
    chk(dut.g_macro[3].u_macro.drv_charge - c0 == 2 * 256 + 127 * 2 * 128, "store charge");
    @(negedge clk);
    rst_n = 0; vdd = 0;
    repeat (5) @(negedge clk);
    vdd = 1; rst_n = 1;
    nv_op(0);
    for (int a = 0; a < NW; a++) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
