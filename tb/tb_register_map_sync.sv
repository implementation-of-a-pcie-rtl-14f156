// Testbench for register_map_sync with the default 32-bit width, on two
// unrelated clocks (periods 40 and 106 time units).
// Checks, in both directions (control: PCIe -> sync_clk, monitor:
// sync_clk -> PCIe):
//   - both outputs are zero while in reset;
//   - after a new value is applied and held, the other side shows it within
//     a bound of 8 cycles of the slower clock;
//   - at every destination clock edge the output is a value that the source
//     has actually driven at some time (a word is never seen half-updated);
//   - when the source changes every cycle (faster than the crossing), the
//     output still only shows driven values and settles on the last one.
module tb_register_map_sync;
  logic pcie_clk = 0, sync_clk = 0, pcie_rst_n = 0, sync_rst_n = 0;
  logic [31:0] ctrl_pcie = '0, mon_pcie, register_map_control, register_map_monitor = '0;
  int checks = 0, failures = 0;

  always #20 pcie_clk = ~pcie_clk;
  always #53 sync_clk = ~sync_clk;

  register_map_sync dut (.*);

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // every value each source has ever driven
  bit seen_ctrl [logic [31:0]];
  bit seen_mon  [logic [31:0]];
  initial begin seen_ctrl[32'h0] = 1; seen_mon[32'h0] = 1; end
  always @(ctrl_pcie) seen_ctrl[ctrl_pcie] = 1;
  always @(register_map_monitor) seen_mon[register_map_monitor] = 1;

  // no torn words
  always @(posedge sync_clk) #1 chk(seen_ctrl.exists(register_map_control), $sformatf("control %h never driven", register_map_control));
  always @(posedge pcie_clk) #1 chk(seen_mon.exists(mon_pcie), $sformatf("monitor %h never driven", mon_pcie));

  initial begin
    int n;
    repeat (3) @(posedge sync_clk);
    chk(register_map_control == 0 && mon_pcie == 0, "zero in reset");
    pcie_rst_n = 1; sync_rst_n = 1;
    repeat (3) @(posedge sync_clk);
    // held values
    for (int t = 0; t < 50; t++) begin
      logic [31:0] c, m;
      c = $urandom; m = $urandom;
      @(negedge pcie_clk) ctrl_pcie = c;
      @(negedge sync_clk) register_map_monitor = m;
      n = 0;
      while ((register_map_control !== c || mon_pcie !== m) && n < 8) begin @(posedge sync_clk); #1; n++; end
      chk(register_map_control === c, $sformatf("control %h not delivered, got %h", c, register_map_control));
      chk(mon_pcie === m, $sformatf("monitor %h not delivered, got %h", m, mon_pcie));
    end
    // sources changing every cycle
    fork
      repeat (200) @(negedge pcie_clk) ctrl_pcie = $urandom;
      repeat (80)  @(negedge sync_clk) register_map_monitor = $urandom;
    join
    repeat (8) @(posedge sync_clk);
    chk(register_map_control === ctrl_pcie, "control settles on the last value");
    chk(mon_pcie === register_map_monitor, "monitor settles on the last value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
