// Block-count sweep of wupper_fft_system at its default parameters.
//
// Mirrors the host program that reads a number of 1 kB blocks from the
// card: for 1, 10, 100, 1000 and 10000 blocks, each endpoint's host model holds
// that many 1 kB blocks of input (16 words of 512 bits each: the real parts
// on endpoint 0, the imaginary parts on endpoint 1), the FromHost
// descriptors read them and the ToHost descriptors write the same number of
// 1 kB result blocks back, using 1 kB (256-DW) TLPs. Both PCIe clocks and
// the FIFO clock run at 250 MHz (period 40 time units = 4 ns), with
// unrelated phases; the host models do not stall and answer reads after a
// few cycles, so the rate printed (result bits of both endpoints divided
// by the time from enabling the descriptors to the last write TLP) is what
// the design sustains against a fast host, not a prediction for a real PC.
// Checks per block count: one write TLP per block on each endpoint, the
// ToHost and FromHost done flags set, no frame lost, and every result
// frame equal to the FFT (DFT/32 within 7 LSBs) of its input frame.
module tb_wupper_block_reads;
  localparam int N = 32;
  localparam real PI = 3.14159265358979323846;
  localparam int SIZES [5] = '{1, 10, 100, 1000, 10000};

  logic pcie_clk [2], pcie_rst_n [2];
  logic [15:0] bdf_id [2];
  logic [511:0] cq_tdata [2], cc_tdata [2], rq_tdata [2], rc_tdata [2];
  logic cq_tvalid [2], cq_tlast [2], cq_tready [2], cc_tvalid [2], cc_tlast [2], cc_tready [2];
  logic rq_tvalid [2], rq_tlast [2], rq_tready [2], rc_tvalid [2], rc_tlast [2], rc_tready [2];
  logic fifo_clk = 0, fifo_rst_n = 0, sync_clk = 0, sync_rst_n = 0;
  logic [31:0] lost_frames, register_map_control, register_map_monitor = '0;

  initial begin
    pcie_clk[0] = 0; pcie_clk[1] = 0; pcie_rst_n[0] = 0; pcie_rst_n[1] = 0;
    bdf_id[0] = 16'h0100; bdf_id[1] = 16'h0200;
  end
  always #20 pcie_clk[0] = ~pcie_clk[0];
  initial begin #9;  forever #20 pcie_clk[1] = ~pcie_clk[1]; end
  initial begin #13; forever #20 fifo_clk    = ~fifo_clk;    end
  always #50 sync_clk = ~sync_clk;

  wupper_fft_system dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // input sample i of frame f, endpoint e (0 real, 1 imaginary), from a seed
  int unsigned seed;
  function automatic int sample(int unsigned sd, int e, int f, int i);
    int unsigned h;
    h = sd ^ (f * 32'h9E3779B9) ^ (e * 32'h85EBCA6B) ^ (i * 32'hC2B2AE35);
    h = h * 32'd1664525 + 32'd1013904223;
    h = h * 32'd1664525 + 32'd1013904223;
    return int'(h >> 17) - 16383;
  endfunction

  localparam longint SRC = 64'h0100_0000, DST = 64'h0800_0000;
  int nblk;
  bit go = 0;
  longint t_start;

  for (genvar e = 0; e < 2; e++) begin : g_host
    pcie_host_model #(.STALL(0)) host (
      .clk(pcie_clk[e]),
      .cq_tdata(cq_tdata[e]), .cq_tvalid(cq_tvalid[e]), .cq_tlast(cq_tlast[e]), .cq_tready(cq_tready[e]),
      .cc_tdata(cc_tdata[e]), .cc_tvalid(cc_tvalid[e]), .cc_tlast(cc_tlast[e]), .cc_tready(cc_tready[e]),
      .rq_tdata(rq_tdata[e]), .rq_tvalid(rq_tvalid[e]), .rq_tlast(rq_tlast[e]), .rq_tready(rq_tready[e]),
      .rc_tdata(rc_tdata[e]), .rc_tvalid(rc_tvalid[e]), .rc_tlast(rc_tlast[e]), .rc_tready(rc_tready[e]));

    bit finished = 0;
    longint t_end;
    logic [31:0] done;
    initial forever begin
      int mwr0;
      wait (go);
      for (int f = 0; f < 16 * nblk; f++)
        for (int j = 0; j < 16; j++)
          host.mem[(SRC >> 2) + 16*f + j] = {16'(sample(seed, e, f, 2*j+1)), 16'(sample(seed, e, f, 2*j))};
      host.reg_write(32'h000, 32'(DST));  host.reg_write(32'h008, 32'(DST + 1024*nblk));
      host.reg_write(32'h010, 32'd256);
      host.reg_write(32'h020, 32'(SRC));  host.reg_write(32'h028, 32'(SRC + 1024*nblk));
      host.reg_write(32'h030, 32'd256);
      mwr0 = host.n_mwr;
      if (e == 0) t_start = $time;
      host.reg_write(32'h100, 32'h3);
      wait (host.n_mwr == mwr0 + nblk);
      t_end = $time;
      repeat (20) @(posedge pcie_clk[e]);
      host.reg_read(32'h104, done);
      finished = 1;
      wait (!go);
    end
  end

  initial begin
    real gbps;
    repeat (4) @(posedge fifo_clk);
    pcie_rst_n[0] = 1; pcie_rst_n[1] = 1; fifo_rst_n = 1; sync_rst_n = 1;
    repeat (10) @(posedge fifo_clk);
    $display(" blocks   time(ns)   Gbit/s (both endpoints)");
    foreach (SIZES[s]) begin
      int bad;
      nblk = SIZES[s];
      seed = $urandom;
      g_host[0].finished = 0; g_host[1].finished = 0;
      go = 1;
      wait (g_host[0].finished && g_host[1].finished);
      go = 0;
      gbps = 2.0 * nblk * 8192.0 / (real'((g_host[0].t_end > g_host[1].t_end ? g_host[0].t_end : g_host[1].t_end) - t_start) / 10.0);
      $display("%7d %10.1f %8.2f", nblk, real'((g_host[0].t_end > g_host[1].t_end ? g_host[0].t_end : g_host[1].t_end) - t_start) / 10.0, gbps);
      chk(g_host[0].done == 3 && g_host[1].done == 3, $sformatf("%0d blocks: done flags %h %h", nblk, g_host[0].done, g_host[1].done));
      chk(lost_frames == 0, $sformatf("%0d blocks: %0d frames lost", nblk, lost_frames));
      bad = 0;
      for (int f = 0; f < 16 * nblk; f++) begin
        bit ok;
        ok = 1;
        for (int k = 0; k < N; k++) begin
          real er, ei;
          logic [31:0] wr, wi;
          er = 0; ei = 0;
          for (int i = 0; i < N; i++) begin
            er += sample(seed, 0, f, i) * $cos(2.0*PI*k*i/N) + sample(seed, 1, f, i) * $sin(2.0*PI*k*i/N);
            ei += sample(seed, 1, f, i) * $cos(2.0*PI*k*i/N) - sample(seed, 0, f, i) * $sin(2.0*PI*k*i/N);
          end
          wr = g_host[0].host.rd_dw((DST >> 2) + 16*f + k/2);
          wi = g_host[1].host.rd_dw((DST >> 2) + 16*f + k/2);
          if ($signed(wr[16*(k%2) +: 16]) - er/N > 7.0 || er/N - $signed(wr[16*(k%2) +: 16]) > 7.0 ||
              $signed(wi[16*(k%2) +: 16]) - ei/N > 7.0 || ei/N - $signed(wi[16*(k%2) +: 16]) > 7.0) ok = 0;
        end
        if (!ok) bad++;
      end
      chk(bad == 0, $sformatf("%0d blocks: %0d wrong result frames", nblk, bad));
      repeat (50) @(posedge fifo_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
