// End-to-end testbench of pcie_fft_bench_top, all parameters at their
// defaults; both halves of the design run at the same time.
//
// XDMA half: the testbench plays the DMA bridge. 400 frames of the 16-point
// FFT go through H2C with random stalls and must come back on C2H as their
// FFT; then C2H stops while frames are sent at full rate: fifo1 fills and
// frames are lost at the FFT output, and fifo0, written at 250 MHz but read
// at the slightly slower fft_clk, eventually fills too (H2C back-pressure); the verifier's
// lost/transmitted/packets counters, read over AXI4-Lite, must account for
// every frame.
// Wupper half: two host models, one per endpoint. FromHost descriptors read
// a 32-frame source buffer in circular mode (it wraps), ToHost descriptors
// write 96 result frames to a one-shot buffer, endpoint 1's above 4 GiB
// (4-DW headers). Each host stops its FromHost descriptor 4000 cycles after
// its ToHost one is done; the frames read meanwhile fill the toHost FIFOs
// (prog_full, then full) and are lost. Results must be the FFT of source frame f mod 32.
//
// Each mechanism is counted and must occur at least once: H2C back-pressure,
// C2H FIFO overflow loss, verifier packets, memory-write TLPs with 3- and
// 4-DW headers, memory-read TLPs, circular wrap, FFT waiting for one
// endpoint's half (one-sided), FFT output held back by prog_full, Wupper
// frames lost, register reads completed, register-map synchronisation.
module tb_pcie_fft_bench_top;
  import pcie_fft_pkg::*;
  localparam real PI = 3.14159265358979323846;

  // ---------------- ports ----------------
  logic xdma_axi_aclk = 0, xdma_axi_aresetn = 0, xdma_fft_clk = 0, xdma_fft_rst = 0;
  logic [511:0] xdma_h2c_tdata = '0, xdma_c2h_tdata;
  logic xdma_h2c_tvalid = 0, xdma_h2c_tready, xdma_c2h_tvalid, xdma_c2h_tready = 0;
  logic [3:0]  xdma_s_axi_awaddr = 0, xdma_s_axi_araddr = 0, xdma_s_axi_wstrb = 4'hF;
  logic        xdma_s_axi_awvalid = 0, xdma_s_axi_awready, xdma_s_axi_wvalid = 0, xdma_s_axi_wready;
  logic [31:0] xdma_s_axi_wdata = 0, xdma_s_axi_rdata;
  logic [1:0]  xdma_s_axi_bresp, xdma_s_axi_rresp;
  logic        xdma_s_axi_bvalid, xdma_s_axi_bready = 1, xdma_s_axi_arvalid = 0, xdma_s_axi_arready;
  logic        xdma_s_axi_rvalid, xdma_s_axi_rready = 1;

  logic wup_pcie_clk [2], wup_pcie_rst_n [2];
  logic [15:0] wup_bdf_id [2];
  logic [511:0] wup_cq_tdata [2], wup_cc_tdata [2], wup_rq_tdata [2], wup_rc_tdata [2];
  logic wup_cq_tvalid [2], wup_cq_tlast [2], wup_cq_tready [2], wup_cc_tvalid [2], wup_cc_tlast [2], wup_cc_tready [2];
  logic wup_rq_tvalid [2], wup_rq_tlast [2], wup_rq_tready [2], wup_rc_tvalid [2], wup_rc_tlast [2], wup_rc_tready [2];
  logic wup_fifo_clk = 0, wup_fifo_rst_n = 0, wup_sync_clk = 0, wup_sync_rst_n = 0;
  logic [31:0] wup_lost_frames, wup_register_map_control, wup_register_map_monitor = 32'h0BAD_CAFE;

  initial begin
    wup_pcie_clk[0] = 0; wup_pcie_clk[1] = 0; wup_pcie_rst_n[0] = 0; wup_pcie_rst_n[1] = 0;
    wup_bdf_id[0] = 16'h0100; wup_bdf_id[1] = 16'h0200;
  end

  always #20   xdma_axi_aclk   = ~xdma_axi_aclk;
  always #23 xdma_fft_clk    = ~xdma_fft_clk;
  always #20   wup_pcie_clk[0] = ~wup_pcie_clk[0];
  always #21 wup_pcie_clk[1] = ~wup_pcie_clk[1];
  always #22 wup_fifo_clk    = ~wup_fifo_clk;
  always #50   wup_sync_clk    = ~wup_sync_clk;

  pcie_fft_bench_top dut (.*);

  // ---------------- Wupper host side ----------------
  localparam int N32 = 32, NSRC = 32, NDST = 96;
  localparam longint SRC = 64'h0010_0000;
  localparam longint DST [2] = '{64'h0020_0000, 64'h1_0020_0000};
  bit w_go = 0;

  // one host per endpoint; each programs its descriptors, polls the ToHost
  // done flag and then stops its circular FromHost descriptor
  for (genvar e = 0; e < 2; e++) begin : g_host
    pcie_host_model host (
      .clk(wup_pcie_clk[e]),
      .cq_tdata(wup_cq_tdata[e]), .cq_tvalid(wup_cq_tvalid[e]), .cq_tlast(wup_cq_tlast[e]), .cq_tready(wup_cq_tready[e]),
      .cc_tdata(wup_cc_tdata[e]), .cc_tvalid(wup_cc_tvalid[e]), .cc_tlast(wup_cc_tlast[e]), .cc_tready(wup_cc_tready[e]),
      .rq_tdata(wup_rq_tdata[e]), .rq_tvalid(wup_rq_tvalid[e]), .rq_tlast(wup_rq_tlast[e]), .rq_tready(wup_rq_tready[e]),
      .rc_tdata(wup_rc_tdata[e]), .rc_tvalid(wup_rc_tvalid[e]), .rc_tlast(wup_rc_tlast[e]), .rc_tready(wup_rc_tready[e]));

    bit stopped = 0;
    int reg_reads = 0;
    initial begin
      logic [31:0] dd;
      wait (w_go);
      host.reg_write(32'h000, 32'(DST[e]));           host.reg_write(32'h004, 32'(DST[e] >> 32));
      host.reg_write(32'h008, 32'(DST[e] + 64*NDST)); host.reg_write(32'h00C, 32'(DST[e] >> 32));
      host.reg_write(32'h010, 32'd64);
      host.reg_write(32'h020, 32'(SRC));              host.reg_write(32'h028, 32'(SRC + 64*NSRC));
      host.reg_write(32'h030, 32'h1000 | 32'd64);     // circular
      if (e == 0) host.reg_write(32'h040, 32'h5EC0_0001);
      host.reg_write(32'h100, 32'h3);
      do begin
        repeat (50) @(posedge wup_pcie_clk[e]);
        host.reg_read(32'h104, dd);
        reg_reads++;
      end while (!dd[0]);
      // keep the circular FromHost descriptor running a while so that the
      // toHost FIFOs, no longer drained, overflow
      repeat (4000) @(posedge wup_pcie_clk[e]);
      host.reg_write(32'h100, 32'h0);
      stopped = 1;
    end
  end

  int checks = 0, failures = 0;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // true if y is the FFT (DFT/n) of x within tol LSB per component
  function automatic bit fft_ok(int n, int xr [32], int xi [32], int yr [32], int yi [32], int tol);
    real er, ei;
    for (int k = 0; k < n; k++) begin
      er = 0; ei = 0;
      for (int i = 0; i < n; i++) begin
        er += xr[i] * $cos(2.0*PI*k*i/n) + xi[i] * $sin(2.0*PI*k*i/n);
        ei += xi[i] * $cos(2.0*PI*k*i/n) - xr[i] * $sin(2.0*PI*k*i/n);
      end
      if (rabs(yr[k] - er/n) > tol || rabs(yi[k] - ei/n) > tol) return 0;
    end
    return 1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_h2c_bp = 0, m_one_sided = 0, m_prog_full_hold = 0;
  always @(posedge xdma_axi_aclk) if (xdma_h2c_tvalid && !xdma_h2c_tready) m_h2c_bp++;
  always @(posedge wup_fifo_clk) begin
    if (dut.u_wupper.fh_empty[0] != dut.u_wupper.fh_empty[1]) m_one_sided++;
    if (!dut.u_wupper.ready_out) m_prog_full_hold++;
  end

  // ======================= XDMA side =======================
  localparam int N16 = 16;
  logic [511:0] x_sent [$];
  int x_nsent = 0, x_nrecv = 0;
  bit x_c2h_run = 1;

  function automatic logic [511:0] x_frame(int f);
    logic [511:0] w;
    w = '0;
    if (f == 0) for (int i = 0; i < N16; i++) w[16*i +: 16] = 16'($rtoi($floor(0.1 * $sin(2.0*PI*2*i/N16) * 32768.0 + 0.5)));
    else for (int i = 0; i < 2*N16; i++) w[16*i +: 16] = 16'($urandom_range(0, 32766) - 16383);
    return w;
  endfunction

  // results come back in order; frames lost in the overflow phase are
  // skipped and must number exactly the verifier's lost count
  int x_next = 0, x_skipped = 0;
  bit x_may_lose = 0;

  function automatic bit x_match(logic [511:0] x, logic [511:0] y);
    int xr [32], xi [32], yr [32], yi [32];
    for (int i = 0; i < N16; i++) begin
      xr[i] = $signed(x[16*i +: 16]);  xi[i] = $signed(x[256 + 16*i +: 16]);
      yr[i] = $signed(y[16*i +: 16]);  yi[i] = $signed(y[256 + 16*i +: 16]);
    end
    return fft_ok(N16, xr, xi, yr, yi, 6);
  endfunction

  always @(posedge xdma_axi_aclk) begin
    if (xdma_c2h_tvalid && xdma_c2h_tready) begin
      bit ok;
      int q;
      ok = x_match(x_sent[x_next], xdma_c2h_tdata);
      if (!ok && x_may_lose) begin
        q = x_next + 1;
        while (q < x_sent.size() && !x_match(x_sent[q], xdma_c2h_tdata)) q++;
        if (q < x_sent.size()) begin x_skipped += q - x_next; x_next = q; ok = 1; end
      end
      chk(ok, $sformatf("XDMA frame %0d", x_nrecv));
      x_next++;
      x_nrecv++;
    end
    #5 xdma_c2h_tready = x_c2h_run && ($urandom_range(0, 4) != 0);
  end

  task automatic x_send(int count, bit stall);
    for (int f = 0; f < count; f++) begin
      @(negedge xdma_axi_aclk);
      while (stall && $urandom_range(0, 3) == 0) @(negedge xdma_axi_aclk);
      xdma_h2c_tdata = x_frame(x_nsent);
      xdma_h2c_tvalid = 1;
      do @(posedge xdma_axi_aclk); while (!xdma_h2c_tready);
      x_sent.push_back(xdma_h2c_tdata);
      x_nsent++;
      #5 xdma_h2c_tvalid = 0;
    end
  endtask

  task automatic x_axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge xdma_fft_clk);
    xdma_s_axi_awaddr = a; xdma_s_axi_wdata = d; xdma_s_axi_awvalid = 1; xdma_s_axi_wvalid = 1;
    @(posedge xdma_fft_clk); #1 xdma_s_axi_awvalid = 0; xdma_s_axi_wvalid = 0;
    while (!xdma_s_axi_bvalid) @(posedge xdma_fft_clk);
    @(posedge xdma_fft_clk);
  endtask

  task automatic x_axi_read(logic [3:0] a, output logic [31:0] d);
    @(negedge xdma_fft_clk);
    xdma_s_axi_araddr = a; xdma_s_axi_arvalid = 1;
    @(posedge xdma_fft_clk); #1 xdma_s_axi_arvalid = 0;
    while (!xdma_s_axi_rvalid) @(posedge xdma_fft_clk);
    #1 d = xdma_s_axi_rdata;
    @(posedge xdma_fft_clk);
  endtask

  int x_lost = 0, x_xmit = 0, x_pkts = 0;
  bit x_done = 0;

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge xdma_axi_aclk);
    xdma_axi_aresetn = 1; xdma_fft_rst = 1;
    repeat (10) @(posedge xdma_fft_clk);
    x_axi_write(4'h0, 32'h1);
    x_send(400, 1);
    wait (x_nrecv == 400);
    x_may_lose = 1;
    x_c2h_run = 0;
    // H2C runs at full rate, faster than fft_clk drains fifo0, until fifo0
    // fills and pushes back
    while (m_h2c_bp == 0 && x_nsent < 20000) x_send(1, 0);
    x_send(50, 0);
    repeat (100) @(posedge xdma_fft_clk);
    x_c2h_run = 1;
    begin : drain                                   // until C2H is quiet
      int last, quiet;
      quiet = 0;
      while (quiet < 500) begin
        last = x_nrecv;
        @(posedge xdma_axi_aclk);
        quiet = (x_nrecv == last) ? quiet + 1 : 0;
      end
    end
    x_skipped += x_nsent - x_next;
    x_axi_read(4'h4, d); x_lost = d;
    x_axi_read(4'hC, d); x_xmit = d;
    x_axi_read(4'h8, d); x_pkts = d;
    chk(x_xmit == x_nrecv, "verifier transmitted count");
    chk(x_nrecv + x_lost == x_nsent, "XDMA frames accounted for");
    chk(x_skipped == x_lost, "frames missing from C2H equal the lost count");
    x_done = 1;
  end

  // ======================= Wupper side =======================
  int w_re [NSRC][32], w_im [NSRC][32];
  bit w_done = 0;
  int w_wraps = 0, w_reg_reads = 0;

  initial begin
    logic [31:0] d;
    for (int f = 0; f < NSRC; f++)
      for (int i = 0; i < N32; i++) begin
        w_re[f][i] = (f == 0) ? $rtoi($floor(0.1 * $sin(2.0*PI*2*i/N32) * 32768.0 + 0.5)) : $urandom_range(0, 32766) - 16383;
        w_im[f][i] = (f == 0) ? 0 : $urandom_range(0, 32766) - 16383;
      end
    for (int f = 0; f < NSRC; f++)
      for (int j = 0; j < 16; j++) begin
        g_host[0].host.mem[(SRC >> 2) + 16*f + j] = {16'(w_re[f][2*j+1]), 16'(w_re[f][2*j])};
        g_host[1].host.mem[(SRC >> 2) + 16*f + j] = {16'(w_im[f][2*j+1]), 16'(w_im[f][2*j])};
      end
    repeat (4) @(posedge wup_fifo_clk);
    wup_pcie_rst_n[0] = 1; wup_pcie_rst_n[1] = 1; wup_fifo_rst_n = 1; wup_sync_rst_n = 1;
    repeat (10) @(posedge wup_fifo_clk);
    w_go = 1;
    wait (g_host[0].stopped && g_host[1].stopped);
    w_reg_reads = g_host[0].reg_reads + g_host[1].reg_reads;
    repeat (3000) @(posedge wup_fifo_clk);
    g_host[0].host.reg_read(32'h124, d); w_wraps = d;
    // frame f of the destination is the FFT of source frame f mod NSRC
    for (int f = 0; f < NDST; f++) begin
      int xr [32], xi [32], yr [32], yi [32];
      for (int k = 0; k < N32; k++) begin
        logic [31:0] wr, wi;
        xr[k] = w_re[f % NSRC][k]; xi[k] = w_im[f % NSRC][k];
        wr = g_host[0].host.rd_dw((DST[0] >> 2) + 16*f + k/2);
        wi = g_host[1].host.rd_dw((DST[1] >> 2) + 16*f + k/2);
        yr[k] = $signed(wr[16*(k%2) +: 16]);
        yi[k] = $signed(wi[16*(k%2) +: 16]);
      end
      chk(fft_ok(N32, xr, xi, yr, yi, 7), $sformatf("Wupper frame %0d", f));
    end
    chk(wup_register_map_control == 32'h5EC0_0001, "register map control synchronised");
    g_host[0].host.reg_read(32'h044, d);
    chk(d == 32'h0BAD_CAFE, "register map monitor synchronised");
    chk(g_host[0].host.n_bad == 0 && g_host[1].host.n_bad == 0, "register completions well formed");
    w_done = 1;
  end

  // ======================= summary =======================
  task automatic mech(string name, int count);
    $display("  %-34s %0d", name, count);
    chk(count > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    wait (x_done && w_done);
    $display("mechanisms:");
    mech("XDMA H2C back-pressure cycles", m_h2c_bp);
    mech("XDMA frames lost (verifier)", x_lost);
    mech("XDMA packets (verifier)", x_pkts);
    mech("XDMA frames transformed", x_nrecv);
    mech("Wupper 3-DW memory writes", g_host[0].host.n_mwr);
    mech("Wupper 4-DW headers", g_host[1].host.n_hdr4);
    mech("Wupper memory reads", g_host[0].host.n_mrd + g_host[1].host.n_mrd);
    mech("Wupper circular wraps", w_wraps);
    mech("Wupper one-sided waits", m_one_sided);
    mech("Wupper prog_full hold cycles", m_prog_full_hold);
    mech("Wupper frames lost", int'(wup_lost_frames));
    mech("Wupper register reads", w_reg_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
