// Testbench of the detector's dual-port SRAM: random writes on port A and
// random reads on both ports are checked against a reference array, including
// the one-clock read latency and read-before-write on a same-address collision.
module tb_hbd_dpram;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [DEPTH];

  hbd_dpram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp_a, exp_b;
    bit chk_a, chk_b;
    // initialise through port A
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 6'(k); a_wdata = 8'(k * 7 + 3);
      ref_mem[k] = 8'(k * 7 + 3);
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom_range(1)); a_addr = 6'($urandom_range(DEPTH-1));
      a_wdata = 8'($urandom);
      b_en = 1; b_addr = ($urandom_range(3) == 0) ? a_addr : 6'($urandom_range(DEPTH-1));
      exp_a = ref_mem[a_addr];
      exp_b = ref_mem[b_addr];
      if (a_we) ref_mem[a_addr] = a_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata != exp_a) begin failures++; $display("FAIL: port A %h vs %h", a_rdata, exp_a); end
      if (b_rdata != exp_b) begin failures++; $display("FAIL: port B %h vs %h", b_rdata, exp_b); end
    end
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
