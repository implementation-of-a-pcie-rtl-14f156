// Transfer-size sweep of xdma_fft_system at its default parameters.
//
// The testbench plays the DMA bridge and sends one transfer of each size of
// the measurement table, 64 B to 4 MiB in powers of two (1 to 65,536 words
// of 512 bits), through H2C at one word per clock, with C2H always ready.
// Both clocks run at 250 MHz (period 40 time units = 4 ns) with unrelated
// phases. For every transfer it checks each returned word against a
// floating-point DFT/16 of the word sent, and measures the time from the
// first H2C word to the last C2H word; the rate printed is
// bytes * 8 / time. Checks per transfer: all words back in order and
// correct; the verifier reports no loss and its transmitted count grows by
// the word count; for transfers of 16 KiB and more the rate must exceed
// 57.65 Gbit/s, the best rate measured on the original hardware (the
// datapath's own limit is 512 bit x 250 MHz = 128 Gbit/s).
module tb_xdma_transfer_sizes;
  localparam int N = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real TCLK_NS = 4.0;

  logic axi_aclk = 0, axi_aresetn = 0, fft_clk = 0, fft_rst = 0;
  logic [511:0] m_axis_h2c_tdata = '0, s_axis_c2h_tdata;
  logic m_axis_h2c_tvalid = 0, m_axis_h2c_tready, s_axis_c2h_tvalid, s_axis_c2h_tready = 1;
  logic [3:0]  s_axi_awaddr = 0, s_axi_araddr = 0, s_axi_wstrb = 4'hF;
  logic        s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready = 1, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 1;

  always #20 axi_aclk = ~axi_aclk;
  initial begin #7; forever #20 fft_clk = ~fft_clk; end

  xdma_fft_system dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // cos/sin of 2*pi*m/16
  real c16 [16], s16 [16];
  initial for (int m = 0; m < 16; m++) begin c16[m] = $cos(2.0*PI*m/N); s16[m] = $sin(2.0*PI*m/N); end

  function automatic bit fft_ok(logic [511:0] x, logic [511:0] y);
    real er, ei, xr [16], xi [16];
    for (int i = 0; i < N; i++) begin xr[i] = $signed(x[16*i +: 16]); xi[i] = $signed(x[256 + 16*i +: 16]); end
    for (int k = 0; k < N; k++) begin
      er = 0; ei = 0;
      for (int i = 0; i < N; i++) begin
        er += xr[i] * c16[(k*i) % 16] + xi[i] * s16[(k*i) % 16];
        ei += xi[i] * c16[(k*i) % 16] - xr[i] * s16[(k*i) % 16];
      end
      if (rabs($signed(y[16*k +: 16]) - er / N) > 6 || rabs($signed(y[256 + 16*k +: 16]) - ei / N) > 6) return 0;
    end
    return 1;
  endfunction

  // words of the current transfer are generated from a seed, so they need
  // not be stored: word j is rnd(seed, j)
  int unsigned seed;
  function automatic logic [511:0] word(int unsigned sd, int j);
    logic [511:0] w;
    int unsigned h;
    h = sd ^ (j * 32'h9E3779B9);
    for (int i = 0; i < 32; i++) begin
      h = h * 32'd1664525 + 32'd1013904223;
      w[16*i +: 16] = 16'(int'(h >> 17) - 16383);       // -16383 .. 16384
    end
    return w;
  endfunction

  int n_recv, bad_words;
  longint t_last;
  always @(posedge axi_aclk) begin
    if (s_axis_c2h_tvalid && s_axis_c2h_tready) begin
      if (!fft_ok(word(seed, n_recv), s_axis_c2h_tdata)) bad_words++;
      n_recv++;
      t_last = $time;
    end
  end

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

  initial begin
    logic [31:0] lost, xmit, xmit_before;
    longint t_first;
    real gbps;
    repeat (4) @(posedge axi_aclk);
    axi_aresetn = 1; fft_rst = 1;
    repeat (10) @(posedge fft_clk);
    axi_write(4'h0, 32'h1);                 // START
    xmit_before = 0;
    $display("   bytes   words   time(ns)   Gbit/s");
    for (int p = 6; p <= 22; p++) begin
      int words;
      words = 1 << (p - 6);
      seed = $urandom;
      n_recv = 0; bad_words = 0;
      @(negedge axi_aclk);
      for (int j = 0; j < words; j++) begin
        m_axis_h2c_tdata = word(seed, j);
        m_axis_h2c_tvalid = 1;
        do @(posedge axi_aclk); while (!m_axis_h2c_tready);
        if (j == 0) t_first = $time;
        #1;
      end
      m_axis_h2c_tvalid = 0;
      wait (n_recv == words);
      gbps = real'(words) * 512.0 / (real'(t_last - t_first + 40) / 10.0);   // bits per ns
      $display("%8d %7d %10.1f %8.2f", words * 64, words, real'(t_last - t_first + 40) / 10.0, gbps);
      repeat (20) @(posedge axi_aclk);
      axi_read(4'h4, lost); axi_read(4'hC, xmit);
      checks++; if (bad_words != 0) begin failures++; $display("FAIL %0d B: %0d wrong words", words * 64, bad_words); end
      checks++; if (lost != 0) begin failures++; $display("FAIL %0d B: %0d lost", words * 64, lost); end
      checks++; if (xmit - xmit_before != words) begin failures++; $display("FAIL %0d B: transmitted %0d", words * 64, xmit - xmit_before); end
      xmit_before = xmit;
      if (words * 64 >= 16384) begin
        checks++;
        if (gbps <= 57.65) begin failures++; $display("FAIL %0d B: %.2f Gbit/s", words * 64, gbps); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
