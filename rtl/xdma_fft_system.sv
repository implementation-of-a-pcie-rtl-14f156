// XDMA-based FFT test bench (FPGA side).
//
// The host streams 512-bit words to the card through the PCIe DMA bridge's
// host-to-card (H2C) AXI4-Stream master; each word is one frame of the
// 16-point FFT (16 real and 16 imaginary 16-bit samples). A dual-clock FIFO
// carries the words from the bridge clock (axi_aclk) into the 250 MHz FFT
// clock, the FFT transforms one frame per cycle with a latency of 13
// cycles, and a second dual-clock FIFO carries the results back to the
// bridge's card-to-host (C2H) AXI4-Stream slave. The PCIe bridge itself is
// outside this module: its H2C, C2H, clock and reset signals are ports.
//
//   h2c --> [axis fifo 0] --valid_in/In_FFT--> [fpfft16_top] --valid_out/Out_FFT--> [axis fifo 1] --> c2h
//                   ^ready_in (always 1)                    ^ready_out = fifo 1 ready
//
// A valid/ready verifier watches the FFT output handshake (valid_out,
// ready_out), where data is lost if the C2H side does not drain fifo 1;
// the host reads its counters through an AXI4-Lite slave clocked by fft_clk.
// Both clock domains get their reset from a reset synchroniser fed by the
// bridge's axi_aresetn and the board's fft_rst (both active low).
//
// The chain of blocks, the bus widths, the 13-cycle FFT and the verifier
// follow the design this implements; the verifier's place on the FFT output,
// its clock, and the FIFO depths are this design's choices.
module xdma_fft_system
  import pcie_fft_pkg::*;
#(
  parameter int unsigned BUS_W      = XDMA_BUS_W,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned FFT_LAT    = FFT16_LAT
) (
  // PCIe DMA bridge user side
  input  logic             axi_aclk,
  input  logic             axi_aresetn,
  input  logic [BUS_W-1:0] m_axis_h2c_tdata,
  input  logic             m_axis_h2c_tvalid,
  output logic             m_axis_h2c_tready,
  output logic [BUS_W-1:0] s_axis_c2h_tdata,
  output logic             s_axis_c2h_tvalid,
  input  logic             s_axis_c2h_tready,
  // FFT clock and reset
  input  logic             fft_clk,
  input  logic             fft_rst,       // active low
  // verifier registers (fft_clk domain)
  input  logic [3:0]       s_axi_awaddr,
  input  logic             s_axi_awvalid,
  output logic             s_axi_awready,
  input  logic [31:0]      s_axi_wdata,
  input  logic [3:0]       s_axi_wstrb,
  input  logic             s_axi_wvalid,
  output logic             s_axi_wready,
  output logic [1:0]       s_axi_bresp,
  output logic             s_axi_bvalid,
  input  logic             s_axi_bready,
  input  logic [3:0]       s_axi_araddr,
  input  logic             s_axi_arvalid,
  output logic             s_axi_arready,
  output logic [31:0]      s_axi_rdata,
  output logic [1:0]       s_axi_rresp,
  output logic             s_axi_rvalid,
  input  logic             s_axi_rready
);

  localparam int unsigned NPT = BUS_W / (2 * SAMPLE_W);  // FFT points

  logic arst_n, axi_rst_n, fft_rst_n;
  assign arst_n = axi_aresetn && fft_rst;

  reset_sync u_rst_axi (.clk(axi_aclk), .arst_n(arst_n), .rst_n(axi_rst_n));
  reset_sync u_rst_fft (.clk(fft_clk),  .arst_n(arst_n), .rst_n(fft_rst_n));

  logic [BUS_W-1:0] in_fft, out_fft;
  logic             valid_in, ready_in, valid_out, ready_out;
  logic             f0_pfull, f0_full, f0_empty, f1_pfull, f1_full, f1_empty;

  axis_async_fifo #(.DATA_W(BUS_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_DEPTH)) u_fifo0 (
    .s_aclk    (axi_aclk),
    .s_aresetn (axi_rst_n),
    .s_tdata   (m_axis_h2c_tdata),
    .s_tvalid  (m_axis_h2c_tvalid),
    .s_tready  (m_axis_h2c_tready),
    .prog_full (f0_pfull),
    .full      (f0_full),
    .m_aclk    (fft_clk),
    .m_tdata   (in_fft),
    .m_tvalid  (valid_in),
    .m_tready  (ready_in),
    .empty     (f0_empty)
  );

  fpfft16_top #(.N(NPT), .LAT(FFT_LAT)) u_fft (
    .clk       (fft_clk),
    .rst       (fft_rst_n),
    .valid_in  (valid_in),
    .ready_in  (ready_in),
    .In_FFT    (in_fft),
    .valid_out (valid_out),
    .ready_out (ready_out),
    .Out_FFT   (out_fft)
  );

  axis_async_fifo #(.DATA_W(BUS_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_DEPTH)) u_fifo1 (
    .s_aclk    (fft_clk),
    .s_aresetn (fft_rst_n),
    .s_tdata   (out_fft),
    .s_tvalid  (valid_out),
    .s_tready  (ready_out),
    .prog_full (f1_pfull),
    .full      (f1_full),
    .m_aclk    (axi_aclk),
    .m_tdata   (s_axis_c2h_tdata),
    .m_tvalid  (s_axis_c2h_tvalid),
    .m_tready  (s_axis_c2h_tready),
    .empty     (f1_empty)
  );

  count_verifier u_verifier (
    .S_AXI_ACLK    (fft_clk),
    .S_AXI_ARESETN (fft_rst_n),
    .valid         (valid_out),
    .ready         (ready_out),
    .S_AXI_AWADDR  (s_axi_awaddr),
    .S_AXI_AWVALID (s_axi_awvalid),
    .S_AXI_AWREADY (s_axi_awready),
    .S_AXI_WDATA   (s_axi_wdata),
    .S_AXI_WSTRB   (s_axi_wstrb),
    .S_AXI_WVALID  (s_axi_wvalid),
    .S_AXI_WREADY  (s_axi_wready),
    .S_AXI_BRESP   (s_axi_bresp),
    .S_AXI_BVALID  (s_axi_bvalid),
    .S_AXI_BREADY  (s_axi_bready),
    .S_AXI_ARADDR  (s_axi_araddr),
    .S_AXI_ARVALID (s_axi_arvalid),
    .S_AXI_ARREADY (s_axi_arready),
    .S_AXI_RDATA   (s_axi_rdata),
    .S_AXI_RRESP   (s_axi_rresp),
    .S_AXI_RVALID  (s_axi_rvalid),
    .S_AXI_RREADY  (s_axi_rready)
  );

  // FIFO status flags are not needed by the XDMA chain (the stream
  // handshakes carry the same information)
  logic unused_flags;
  assign unused_flags = ^{f0_pfull, f0_full, f0_empty, f1_pfull, f1_full, f1_empty};

endmodule
