// Testbench of the power controller. The store/recall acknowledges of the
// NVRAM and the CPU flip-flops are modelled as four-phase partners that answer
// after a random delay. Checked over a cold boot and 20 sleep/wake cycles:
//  - cold boot powers the domain and releases reset without a recall,
//  - deep sleep stores the NVRAM, then the flip-flops, then isolates and
//    resets the domain, then switches supply and oscillator off,
//  - a wake request powers up, waits PWRUP_CYC clocks, recalls the NVRAM, then
//    the flip-flops, releases isolation and CPU reset, then raises the IRQ,
//  - the supply is never off while isolation is released, and never a
//    store/recall request while the supply is off.
module tb_nv_power_ctrl;
  logic clk = 0, rst_n = 0, wake_req = 0, sleepdeep = 0;
  logic vdd_en, osc_en, iso, dom_rst_n, cpu_rst_n, cpu_irq;
  logic ram_store_req, ram_recall_req, ff_store_req, ff_recall_req;
  logic ram_store_ack = 0, ram_recall_ack = 0, ff_store_ack = 0, ff_recall_ack = 0;
  int checks = 0, failures = 0;

  nv_power_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // handshake partners (they live in the powered domain)
  always begin
    @(posedge clk);
    repeat ($urandom_range(3)) @(posedge clk);
    ram_store_ack  <= ram_store_req;
    ram_recall_ack <= ram_recall_req;
    ff_store_ack   <= ff_store_req;
    ff_recall_ack  <= ff_recall_req;
  end

  // event log: order in which requests rose
  string events [$];
  logic [5:0] prev = '0;
  always @(negedge clk) begin
    logic [5:0] now;
    now = {ram_store_req, ff_store_req, ram_recall_req, ff_recall_req, cpu_irq, vdd_en};
    if (now[5] && !prev[5]) events.push_back("ST_RAM");
    if (now[4] && !prev[4]) events.push_back("ST_FF");
    if (now[3] && !prev[3]) events.push_back("RC_RAM");
    if (now[2] && !prev[2]) events.push_back("RC_FF");
    if (now[1] && !prev[1]) events.push_back("IRQ");
    if (now[0] && !prev[0]) events.push_back("ON");
    if (!now[0] && prev[0]) events.push_back("OFF");
    prev = now;
    if (rst_n) begin
      checks++;
      if (!vdd_en && !iso) begin failures++; $display("FAIL: domain off but not isolated"); end
      if (!vdd_en && (ram_store_req || ram_recall_req || ff_store_req || ff_recall_req)) begin
        failures++; $display("FAIL: request while off");
      end
      if (cpu_rst_n && (iso || !dom_rst_n)) begin failures++; $display("FAIL: CPU out of reset while isolated"); end
    end
  end

  function automatic string joined();
    string s = "";
    foreach (events[k]) s = {s, events[k], " "};
    events.delete();
    return s;
  endfunction

  initial begin
    int t_on;
    string ev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cpu_rst_n);
    repeat (2) @(posedge clk);
    ev = joined();
    chk(ev == "ON ", {"cold boot without recall: ", ev});
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(5, 1)) @(posedge clk);
      sleepdeep = 1;
      wait (!vdd_en);
      repeat (2) @(posedge clk);
      sleepdeep = 0;
      ev = joined();
      chk(ev == "ST_RAM ST_FF OFF ", {"store sequence: ", ev});
      chk(!osc_en && iso && !cpu_rst_n && !dom_rst_n, "off state");
      repeat ($urandom_range(10, 2)) @(posedge clk);
      @(negedge clk) wake_req = 1;
      @(negedge clk) wake_req = 0;
      wait (vdd_en);
      t_on = 0;
      while (!ram_recall_req) begin @(negedge clk); t_on++; end
      chk(t_on == 3, $sformatf("power-up wait %0d clocks", t_on));
      wait (cpu_irq);
      repeat (2) @(posedge clk);
      ev = joined();
      chk(ev == "ON RC_RAM RC_FF IRQ ", {"wake sequence: ", ev});
      chk(cpu_rst_n && !iso, "running");
    end
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
