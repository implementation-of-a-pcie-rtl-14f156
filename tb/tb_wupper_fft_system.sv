// Testbench for wupper_fft_system with default parameters: two host
// models, one per endpoint, each with its own clock. Host memory holds 64
// frames of the 32-point FFT: the real halves (512 bits each) in endpoint
// 0's buffer, the imaginary halves in endpoint 1's. Each host programs its
// endpoint's FromHost descriptor (read the frames) and ToHost descriptor
// (write the results), 64-DW TLPs, and starts them. Checks: both endpoints
// finish; the result halves in the two host memories together are the FFT
// (DFT/32, within 7 LSBs) of the matching input frame; no frame is lost;
// the register-map control word written by the host reaches the sync_clk
// side and the monitor word comes back. Also counted: cycles where only
// one endpoint had its half ready, so the FFT had to wait for the other.
module tb_wupper_fft_system;
  localparam int N = 32, NF = 64;
  localparam real PI = 3.14159265358979323846;
  localparam longint SRC = 64'h0010_0000, DST = 64'h0020_0000;

  logic pcie_clk [2], pcie_rst_n [2];
  logic [15:0] bdf_id [2];
  logic [511:0] cq_tdata [2], cc_tdata [2], rq_tdata [2], rc_tdata [2];
  logic cq_tvalid [2], cq_tlast [2], cq_tready [2], cc_tvalid [2], cc_tlast [2], cc_tready [2];
  logic rq_tvalid [2], rq_tlast [2], rq_tready [2], rc_tvalid [2], rc_tlast [2], rc_tready [2];
  logic fifo_clk = 0, fifo_rst_n = 0, sync_clk = 0, sync_rst_n = 0;
  logic [31:0] lost_frames, register_map_control, register_map_monitor = 32'hFEED_0042;

  initial begin
    pcie_clk[0] = 0; pcie_clk[1] = 0; pcie_rst_n[0] = 0; pcie_rst_n[1] = 0;
    bdf_id[0] = 16'h0100; bdf_id[1] = 16'h0200;
  end
  always #20   pcie_clk[0] = ~pcie_clk[0];
  always #21 pcie_clk[1] = ~pcie_clk[1];
  always #22 fifo_clk    = ~fifo_clk;
  always #50   sync_clk    = ~sync_clk;

  wupper_fft_system dut (.*);

  for (genvar e = 0; e < 2; e++) begin : g_host
    pcie_host_model host (
      .clk(pcie_clk[e]),
      .cq_tdata(cq_tdata[e]), .cq_tvalid(cq_tvalid[e]), .cq_tlast(cq_tlast[e]), .cq_tready(cq_tready[e]),
      .cc_tdata(cc_tdata[e]), .cc_tvalid(cc_tvalid[e]), .cc_tlast(cc_tlast[e]), .cc_tready(cc_tready[e]),
      .rq_tdata(rq_tdata[e]), .rq_tvalid(rq_tvalid[e]), .rq_tlast(rq_tlast[e]), .rq_tready(rq_tready[e]),
      .rc_tdata(rc_tdata[e]), .rc_tvalid(rc_tvalid[e]), .rc_tlast(rc_tlast[e]), .rc_tready(rc_tready[e]));
  end

  int checks = 0, failures = 0, one_sided = 0;
  int x_re [NF][N], x_im [NF][N];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fifo_clk) if (dut.fh_empty[0] != dut.fh_empty[1]) one_sided++;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    logic [31:0] d;
    int bad, done0, done1;
    real er, ei;
    // frames: sine k=2 first, then random half-scale data
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        x_re[f][i] = (f == 0) ? $rtoi($floor(0.1 * $sin(2.0*PI*2*i/N) * 32768.0 + 0.5))
                              : $urandom_range(0, 32766) - 16383;
        x_im[f][i] = (f == 0) ? 0 : $urandom_range(0, 32766) - 16383;
      end
    for (int f = 0; f < NF; f++)
      for (int j = 0; j < 16; j++) begin
        g_host[0].host.mem[(SRC >> 2) + 16*f + j] = {16'(x_re[f][2*j+1]), 16'(x_re[f][2*j])};
        g_host[1].host.mem[(SRC >> 2) + 16*f + j] = {16'(x_im[f][2*j+1]), 16'(x_im[f][2*j])};
      end
    repeat (4) @(posedge fifo_clk);
    pcie_rst_n[0] = 1; pcie_rst_n[1] = 1; fifo_rst_n = 1; sync_rst_n = 1;
    repeat (10) @(posedge fifo_clk);
    fork
      begin
        g_host[0].host.reg_write(32'h000, 32'(DST));  g_host[0].host.reg_write(32'h008, 32'(DST + 64*NF));
        g_host[0].host.reg_write(32'h010, 32'd64);
        g_host[0].host.reg_write(32'h020, 32'(SRC));  g_host[0].host.reg_write(32'h028, 32'(SRC + 64*NF));
        g_host[0].host.reg_write(32'h030, 32'd64);
        g_host[0].host.reg_write(32'h040, 32'hC0DE_0001);
        g_host[0].host.reg_write(32'h100, 32'h3);
      end
      begin
        g_host[1].host.reg_write(32'h000, 32'(DST));  g_host[1].host.reg_write(32'h008, 32'(DST + 64*NF));
        g_host[1].host.reg_write(32'h010, 32'd64);
        g_host[1].host.reg_write(32'h020, 32'(SRC));  g_host[1].host.reg_write(32'h028, 32'(SRC + 64*NF));
        g_host[1].host.reg_write(32'h030, 32'd64);
        g_host[1].host.reg_write(32'h100, 32'h3);
      end
    join
    do begin
      repeat (50) @(posedge pcie_clk[0]);
      g_host[0].host.reg_read(32'h104, d); done0 = d;
      g_host[1].host.reg_read(32'h104, d); done1 = d;
    end while (!(done0 == 3 && done1 == 3));
    checks++;
    // results
    bad = 0;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        logic [31:0] wr, wi;
        int yr, yi;
        er = 0; ei = 0;
        for (int i = 0; i < N; i++) begin
          er += x_re[f][i] * $cos(2.0*PI*k*i/N) + x_im[f][i] * $sin(2.0*PI*k*i/N);
          ei += x_im[f][i] * $cos(2.0*PI*k*i/N) - x_re[f][i] * $sin(2.0*PI*k*i/N);
        end
        wr = g_host[0].host.rd_dw((DST >> 2) + 16*f + k/2);
        wi = g_host[1].host.rd_dw((DST >> 2) + 16*f + k/2);
        yr = $signed(wr[16*(k%2) +: 16]);
        yi = $signed(wi[16*(k%2) +: 16]);
        checks++;
        if (rabs(yr - er/N) > 7 || rabs(yi - ei/N) > 7) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d bin %0d: (%0d,%0d) vs (%f,%f)", f, k, yr, yi, er/N, ei/N);
        end
      end
    checks++;
    if (lost_frames != 0) begin failures++; $display("FAIL lost %0d", lost_frames); end
    // register map through the synchroniser
    checks++;
    if (register_map_control != 32'hC0DE_0001) begin failures++; $display("FAIL control %h", register_map_control); end
    g_host[0].host.reg_read(32'h044, d);
    checks++;
    if (d != 32'hFEED_0042) begin failures++; $display("FAIL monitor %h", d); end
    $display("write TLPs %0d/%0d, read TLPs %0d/%0d, one-sided cycles %0d",
             g_host[0].host.n_mwr, g_host[1].host.n_mwr, g_host[0].host.n_mrd, g_host[1].host.n_mrd, one_sided);
    checks++;
    if (g_host[0].host.n_mwr != NF / 4 || g_host[1].host.n_mwr != NF / 4) begin failures++; $display("FAIL TLP count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
