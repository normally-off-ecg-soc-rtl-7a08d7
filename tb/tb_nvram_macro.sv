// Testbench of the 6T-4C macro model. Random words are written and read back
// (byte enables included); a store steps all 128 rows with charge sharing;
// the supply is removed (scrambling the SRAM latches) and restored; a recall
// steps the rows again and every word must be back. The plate-line driver
// charge is checked against the expected values: with sharing each row after
// the first needs only half a line's charge (store: 2 x 256 + 127 x 2 x 128,
// recall: 256 + 127 x 128), and a store without sharing needs 128 x 2 x 256.
module tb_nvram_macro;
  import nvram_pkg::*;
  logic clk = 0, vdd = 0, ce = 0, we = 0, bl_eq = 1;
  logic [MAW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] be = '0;
  pl_cmd_t pl = '0;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [ROWS * WORDS_ROW];

  nvram_macro dut (.*);
  always #10 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input logic [31:0] d, input logic [3:0] b);
    @(negedge clk);
    ce = 1; we = 1; bl_eq = 0; addr = MAW'(a); wdata = d; be = b;
    for (int k = 0; k < 4; k++) if (b[k]) ref_mem[a][k*8 +: 8] = d[k*8 +: 8];
    @(negedge clk);
    ce = 0; we = 0; bl_eq = 1;
  endtask
  task automatic rd_check(input int a);
    @(negedge clk);
    ce = 1; we = 0; bl_eq = 0; addr = MAW'(a);
    @(negedge clk);
    ce = 0; bl_eq = 1;
    chk(rdata == ref_mem[a], $sformatf("word %0d: %h vs %h", a, rdata, ref_mem[a]));
  endtask
  task automatic sweep(input bit store, input bit share);
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      pl.step = 1; pl.row = RAW'(r); pl.drv_a = 1; pl.drv_b = store;
      pl.share = share && r != 0;
    end
    @(negedge clk);
    pl = '0;
    @(negedge clk);   // let the last drive phase complete
  endtask

  initial begin
    longint c0;
    #5 vdd = 1;
    for (int a = 0; a < ROWS * WORDS_ROW; a++) wr(a, $urandom, 4'hf);
    for (int n = 0; n < 300; n++) wr(int'($urandom_range(ROWS * WORDS_ROW - 1)), $urandom, 4'($urandom));
    for (int n = 0; n < 300; n++) rd_check(int'($urandom_range(ROWS * WORDS_ROW - 1)));
    c0 = dut.drv_charge;
    sweep(1, 1);
    chk(dut.drv_charge - c0 == 2 * 256 + 127 * 2 * 128, $sformatf("store charge %0d", dut.drv_charge - c0));
    @(negedge clk) vdd = 0;
    repeat (3) @(negedge clk);
    vdd = 1;
    c0 = dut.drv_charge;
    sweep(0, 1);
    chk(dut.drv_charge - c0 == 256 + 127 * 128, $sformatf("recall charge %0d", dut.drv_charge - c0));
    for (int a = 0; a < ROWS * WORDS_ROW; a++) rd_check(a);
    c0 = dut.drv_charge;
    sweep(1, 0);
    chk(dut.drv_charge - c0 == 128 * 2 * 256, $sformatf("store without sharing %0d", dut.drv_charge - c0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
