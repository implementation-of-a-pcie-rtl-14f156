// Testbench for xdma_fft_system with default parameters. The testbench
// plays the DMA bridge: it streams 512-bit frames into the H2C port and
// drains the C2H port, with the two clocks unrelated. Phase 1: 300 frames
// (the k = 2 sine of the functional test, 16 deltas, random data) with
// random stalls on both sides; every C2H word must be the FFT (DFT/16,
// within 6 LSBs) of the matching H2C word, in order, and the verifier,
// read over AXI4-Lite, must report 300 transmitted, 0 lost. Phase 2: C2H
// stops while 700 more frames are sent: the C2H FIFO fills, frames are
// lost, and received + lost (verifier count) must equal frames sent. The
// frames missing from the C2H stream must number exactly the lost count,
// and every frame that does arrive must still be the FFT of its input.
module tb_xdma_fft_system;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;
  logic axi_aclk = 0, axi_aresetn = 0, fft_clk = 0, fft_rst = 0;
  logic [511:0] m_axis_h2c_tdata = '0, s_axis_c2h_tdata;
  logic m_axis_h2c_tvalid = 0, m_axis_h2c_tready, s_axis_c2h_tvalid, s_axis_c2h_tready = 0;
  logic [3:0]  s_axi_awaddr = 0, s_axi_araddr = 0, s_axi_wstrb = 4'hF;
  logic        s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready = 1, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 1;

  always #20   axi_aclk = ~axi_aclk;
  always #23 fft_clk  = ~fft_clk;

  xdma_fft_system dut (.*);

  int checks = 0, failures = 0;
  logic [511:0] sent [$];
  int n_sent = 0, n_recv = 0;
  bit c2h_run = 1;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [511:0] frame(int f);
    logic [511:0] w;
    w = '0;
    if (f == 0)
      for (int i = 0; i < N; i++) w[16*i +: 16] = 16'($rtoi($floor(0.1 * $sin(2.0*PI*2*i/N) * 32768.0 + 0.5)));
    else if (f <= N) w[16*(f-1) +: 16] = 16'h4000;
    else for (int i = 0; i < 2*N; i++) w[16*i +: 16] = 16'($urandom_range(0, 32766) - 16383);
    return w;
  endfunction

  // number of bins of y that are not the FFT of x
  function automatic int fft_bad(logic [511:0] x, logic [511:0] y);
    real er, ei, xr, xi;
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      er = 0; ei = 0;
      for (int i = 0; i < N; i++) begin
        xr = $signed(x[16*i +: 16]); xi = $signed(x[16*N + 16*i +: 16]);
        er += xr * $cos(2.0*PI*k*i/N) + xi * $sin(2.0*PI*k*i/N);
        ei += xi * $cos(2.0*PI*k*i/N) - xr * $sin(2.0*PI*k*i/N);
      end
      if (rabs($signed(y[16*k +: 16]) - er / N) > 6 || rabs($signed(y[16*N + 16*k +: 16]) - ei / N) > 6) bad++;
    end
    return bad;
  endfunction

  // C2H sink. Results come back in order; once frames can be lost (phase 2)
  // a received word may skip sent frames, which are counted as skipped and
  // must equal the verifier's lost count.
  int next_sent = 0, skipped = 0;
  bit may_lose = 0;
  always @(posedge axi_aclk) begin
    if (s_axis_c2h_tvalid && s_axis_c2h_tready) begin
      int bad, q;
      bad = fft_bad(sent[next_sent], s_axis_c2h_tdata);
      if (bad != 0 && may_lose) begin
        q = next_sent + 1;
        while (q < sent.size() && fft_bad(sent[q], s_axis_c2h_tdata) != 0) q++;
        if (q < sent.size()) begin skipped += q - next_sent; next_sent = q; bad = 0; end
      end
      checks++;
      if (bad != 0) begin failures++; if (failures < 10) $display("FAIL frame %0d: %0d bins off", n_recv, bad); end
      next_sent++;
      n_recv++;
    end
    #5 s_axis_c2h_tready = c2h_run && ($urandom_range(0, 4) != 0);
  end

  task automatic send_frames(int count, bit stall);
    for (int f = 0; f < count; f++) begin
      @(negedge axi_aclk);
      while (stall && $urandom_range(0, 3) == 0) @(negedge axi_aclk);
      m_axis_h2c_tdata = frame(n_sent);
      m_axis_h2c_tvalid = 1;
      do @(posedge axi_aclk); while (!m_axis_h2c_tready);
      sent.push_back(m_axis_h2c_tdata);
      n_sent++;
      #5 m_axis_h2c_tvalid = 0;
    end
  endtask

  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge fft_clk);
    s_axi_awaddr = a; s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1;
    @(posedge fft_clk); #1 s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(posedge fft_clk);
    @(posedge fft_clk);
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d);
    @(negedge fft_clk);
    s_axi_araddr = a; s_axi_arvalid = 1;
    @(posedge fft_clk); #1 s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(posedge fft_clk);
    #1 d = s_axi_rdata;
    @(posedge fft_clk);
  endtask

  // returns once C2H has delivered nothing for 500 cycles
  task automatic wait_idle();
    int last, quiet;
    quiet = 0;
    while (quiet < 500) begin
      last = n_recv;
      @(posedge axi_aclk);
      quiet = (n_recv == last) ? quiet + 1 : 0;
    end
  endtask

  initial begin
    logic [31:0] lost, xmit, pkts;
    repeat (4) @(posedge axi_aclk);
    axi_aresetn = 1; fft_rst = 1;
    repeat (10) @(posedge fft_clk);
    axi_write(4'h0, 32'h1);                 // START
    send_frames(300, 1);
    wait (n_recv == 300);
    repeat (10) @(posedge fft_clk);
    axi_read(4'hC, xmit); axi_read(4'h4, lost); axi_read(4'h8, pkts);
    checks++; if (xmit != 300) begin failures++; $display("FAIL transmitted %0d", xmit); end
    checks++; if (lost != 0)   begin failures++; $display("FAIL lost %0d", lost); end
    checks++; if (pkts == 0 || pkts > 300) begin failures++; $display("FAIL packets %0d", pkts); end
    // overflow: the card-to-host side stops
    may_lose = 1;
    c2h_run = 0;
    send_frames(700, 0);
    repeat (100) @(posedge fft_clk);
    c2h_run = 1;
    wait_idle();
    axi_read(4'h4, lost);
    skipped += n_sent - next_sent;          // lost frames after the last arrival
    $display("sent %0d received %0d lost %0d (skipped %0d) packets %0d", n_sent, n_recv, lost, skipped, pkts);
    checks++; if (lost == 0) begin failures++; $display("FAIL no loss when C2H stopped"); end
    checks++; if (n_recv + lost != n_sent) begin failures++; $display("FAIL received + lost != sent"); end
    checks++; if (skipped != lost) begin failures++; $display("FAIL frames missing from C2H != lost count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
