// Testbench for count_verifier. Random valid/ready traffic is applied
// while the verifier runs; the three counters read over AXI4-Lite must
// equal the tallies kept here (lost = valid without ready, transmitted =
// valid with ready, packets = runs of valid). Stopping must freeze the
// counters, the reset bit must clear them, and the write-only control
// register must read as 0.
module tb_count_verifier;
  logic S_AXI_ACLK = 0, S_AXI_ARESETN = 0;
  logic valid = 0, ready = 0;
  logic [3:0]  S_AXI_AWADDR = 0, S_AXI_ARADDR = 0;
  logic        S_AXI_AWVALID = 0, S_AXI_AWREADY, S_AXI_WVALID = 0, S_AXI_WREADY;
  logic [31:0] S_AXI_WDATA = 0, S_AXI_RDATA;
  logic [3:0]  S_AXI_WSTRB = 4'hF;
  logic [1:0]  S_AXI_BRESP, S_AXI_RRESP;
  logic        S_AXI_BVALID, S_AXI_BREADY = 0, S_AXI_ARVALID = 0, S_AXI_ARREADY;
  logic        S_AXI_RVALID, S_AXI_RREADY = 0;

  always #50 S_AXI_ACLK = ~S_AXI_ACLK;

  count_verifier dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge S_AXI_ACLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge S_AXI_ACLK);
    S_AXI_AWADDR = a; S_AXI_AWVALID = 1; S_AXI_WDATA = d; S_AXI_WVALID = 1;
    S_AXI_BREADY = 1;
    while (S_AXI_AWVALID || S_AXI_WVALID) begin
      @(posedge S_AXI_ACLK);
      if (S_AXI_AWREADY) S_AXI_AWVALID <= 0;
      if (S_AXI_WREADY)  S_AXI_WVALID  <= 0;
      #10;
    end
    while (!S_AXI_BVALID) @(posedge S_AXI_ACLK);
    checks++;
    if (S_AXI_BRESP != 2'b00) begin failures++; $display("FAIL bresp"); end
    @(posedge S_AXI_ACLK); #10 S_AXI_BREADY = 0;
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d);
    @(negedge S_AXI_ACLK);
    S_AXI_ARADDR = a; S_AXI_ARVALID = 1;
    do @(posedge S_AXI_ACLK); while (!S_AXI_ARREADY);
    #10 S_AXI_ARVALID = 0;
    repeat ($urandom_range(0, 2)) @(posedge S_AXI_ACLK);   // late RREADY
    while (!S_AXI_RVALID) @(posedge S_AXI_ACLK);
    #10 d = S_AXI_RDATA; S_AXI_RREADY = 1;
    @(posedge S_AXI_ACLK); #10 S_AXI_RREADY = 0;
  endtask

  task automatic expect_reg(logic [3:0] a, int exp, string what);
    logic [31:0] d;
    axi_read(a, d);
    checks++;
    if (d != 32'(exp)) begin failures++; $display("FAIL %s: read %0d expected %0d", what, d, exp); end
  endtask

  int e_lost = 0, e_xmit = 0, e_pkts = 0;
  bit counting = 0, prev_valid = 0;

  // traffic and reference tallies
  initial begin
    forever begin
      @(posedge S_AXI_ACLK);
      if (counting) begin
        if (valid && !ready) e_lost++;
        if (valid && ready) e_xmit++;
        if (valid && !prev_valid) e_pkts++;
      end
      prev_valid = valid;
      #10;
      if (($urandom_range(0, 7)) == 0) valid = !valid;
      ready = ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    repeat (3) @(posedge S_AXI_ACLK);
    #10 S_AXI_ARESETN = 1;
    expect_reg(4'h4, 0, "lost after reset");
    // START: counting begins on the cycle after the write response
    axi_write(4'h0, 32'h1);
    counting = 1;
    repeat (2000) @(posedge S_AXI_ACLK);
    // STOP
    @(negedge S_AXI_ACLK);
    S_AXI_AWADDR = 0; S_AXI_AWVALID = 1; S_AXI_WDATA = 0; S_AXI_WVALID = 1; S_AXI_BREADY = 1;
    @(posedge S_AXI_ACLK); #10 S_AXI_AWVALID = 0; S_AXI_WVALID = 0;
    @(posedge S_AXI_ACLK); #10;   // control register updated at this edge
    counting = 0;
    @(posedge S_AXI_ACLK); #10 S_AXI_BREADY = 0;
    checks++;
    if (e_lost == 0 || e_xmit == 0 || e_pkts == 0) begin failures++; $display("FAIL no traffic"); end
    expect_reg(4'h4, e_lost, "lost");
    expect_reg(4'h8, e_pkts, "packets");
    expect_reg(4'hC, e_xmit, "transmitted");
    repeat (200) @(posedge S_AXI_ACLK);
    expect_reg(4'h4, e_lost, "lost frozen");
    expect_reg(4'hC, e_xmit, "transmitted frozen");
    expect_reg(4'h0, 0, "control reads 0");
    // reset counters
    axi_write(4'h0, 32'h2);
    expect_reg(4'h4, 0, "lost cleared");
    expect_reg(4'h8, 0, "packets cleared");
    expect_reg(4'hC, 0, "transmitted cleared");
    $display("counted lost=%0d packets=%0d transmitted=%0d", e_lost, e_pkts, e_xmit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
