// PCIe FFT test bench: top level.
//
// An FPGA-side test bench for wide, fully parallel signal-processing
// blocks: the host PC sends frames over PCIe, the card runs them through an
// FFT and sends the results back, and the transfer rate and any lost data
// can be measured. Two independent implementations stand side by side:
//
//  * xdma_*: one PCIe Gen3 x16 DMA bridge with 512-bit host-to-card and
//    card-to-host AXI4-Stream channels, dual-clock FIFOs, a 16-point
//    16-parallel FFT (13-cycle latency, 250 MHz), and a valid/ready
//    verifier read over AXI4-Lite;
//  * wup_*: two PCIe Gen4 x8 endpoints (a bifurcated x16 slot), each with
//    its own DMA engine (register map, descriptors, memory read/write TLPs)
//    and 512-bit FIFOs, together feeding a 32-point 32-parallel FFT
//    (19-cycle latency) with 1024-bit frames: real parts through endpoint 0,
//    imaginary parts through endpoint 1.
//
// The PCIe hard blocks, transceivers and clock generators are outside: the
// bridge's AXI4-Stream/AXI4-Lite channels and the endpoints' TLP streams
// (cq/cc completer, rq/rc requester) are this module's ports, with their
// clocks and resets. No logic is shared between the two halves.
module pcie_fft_bench_top
  import pcie_fft_pkg::*;
(
  // ---------------- XDMA-based system ----------------
  input  logic                  xdma_axi_aclk,
  input  logic                  xdma_axi_aresetn,
  input  logic [XDMA_BUS_W-1:0] xdma_h2c_tdata,
  input  logic                  xdma_h2c_tvalid,
  output logic                  xdma_h2c_tready,
  output logic [XDMA_BUS_W-1:0] xdma_c2h_tdata,
  output logic                  xdma_c2h_tvalid,
  input  logic                  xdma_c2h_tready,
  input  logic                  xdma_fft_clk,
  input  logic                  xdma_fft_rst,
  input  logic [3:0]            xdma_s_axi_awaddr,
  input  logic                  xdma_s_axi_awvalid,
  output logic                  xdma_s_axi_awready,
  input  logic [31:0]           xdma_s_axi_wdata,
  input  logic [3:0]            xdma_s_axi_wstrb,
  input  logic                  xdma_s_axi_wvalid,
  output logic                  xdma_s_axi_wready,
  output logic [1:0]            xdma_s_axi_bresp,
  output logic                  xdma_s_axi_bvalid,
  input  logic                  xdma_s_axi_bready,
  input  logic [3:0]            xdma_s_axi_araddr,
  input  logic                  xdma_s_axi_arvalid,
  output logic                  xdma_s_axi_arready,
  output logic [31:0]           xdma_s_axi_rdata,
  output logic [1:0]            xdma_s_axi_rresp,
  output logic                  xdma_s_axi_rvalid,
  input  logic                  xdma_s_axi_rready,
  // ---------------- Wupper-based system ----------------
  input  logic                  wup_pcie_clk   [2],
  input  logic                  wup_pcie_rst_n [2],
  input  logic [15:0]           wup_bdf_id     [2],
  input  logic [WUP_BUS_W-1:0]  wup_cq_tdata   [2],
  input  logic                  wup_cq_tvalid  [2],
  input  logic                  wup_cq_tlast   [2],
  output logic                  wup_cq_tready  [2],
  output logic [WUP_BUS_W-1:0]  wup_cc_tdata   [2],
  output logic                  wup_cc_tvalid  [2],
  output logic                  wup_cc_tlast   [2],
  input  logic                  wup_cc_tready  [2],
  output logic [WUP_BUS_W-1:0]  wup_rq_tdata   [2],
  output logic                  wup_rq_tvalid  [2],
  output logic                  wup_rq_tlast   [2],
  input  logic                  wup_rq_tready  [2],
  input  logic [WUP_BUS_W-1:0]  wup_rc_tdata   [2],
  input  logic                  wup_rc_tvalid  [2],
  input  logic                  wup_rc_tlast   [2],
  output logic                  wup_rc_tready  [2],
  input  logic                  wup_fifo_clk,
  input  logic                  wup_fifo_rst_n,
  output logic [31:0]           wup_lost_frames,
  input  logic                  wup_sync_clk,
  input  logic                  wup_sync_rst_n,
  output logic [31:0]           wup_register_map_control,
  input  logic [31:0]           wup_register_map_monitor
);

  xdma_fft_system u_xdma (
    .axi_aclk          (xdma_axi_aclk),
    .axi_aresetn       (xdma_axi_aresetn),
    .m_axis_h2c_tdata  (xdma_h2c_tdata),
    .m_axis_h2c_tvalid (xdma_h2c_tvalid),
    .m_axis_h2c_tready (xdma_h2c_tready),
    .s_axis_c2h_tdata  (xdma_c2h_tdata),
    .s_axis_c2h_tvalid (xdma_c2h_tvalid),
    .s_axis_c2h_tready (xdma_c2h_tready),
    .fft_clk           (xdma_fft_clk),
    .fft_rst           (xdma_fft_rst),
    .s_axi_awaddr      (xdma_s_axi_awaddr),
    .s_axi_awvalid     (xdma_s_axi_awvalid),
    .s_axi_awready     (xdma_s_axi_awready),
    .s_axi_wdata       (xdma_s_axi_wdata),
    .s_axi_wstrb       (xdma_s_axi_wstrb),
    .s_axi_wvalid      (xdma_s_axi_wvalid),
    .s_axi_wready      (xdma_s_axi_wready),
    .s_axi_bresp       (xdma_s_axi_bresp),
    .s_axi_bvalid      (xdma_s_axi_bvalid),
    .s_axi_bready      (xdma_s_axi_bready),
    .s_axi_araddr      (xdma_s_axi_araddr),
    .s_axi_arvalid     (xdma_s_axi_arvalid),
    .s_axi_arready     (xdma_s_axi_arready),
    .s_axi_rdata       (xdma_s_axi_rdata),
    .s_axi_rresp       (xdma_s_axi_rresp),
    .s_axi_rvalid      (xdma_s_axi_rvalid),
    .s_axi_rready      (xdma_s_axi_rready)
  );

  wupper_fft_system u_wupper (
    .pcie_clk             (wup_pcie_clk),
    .pcie_rst_n           (wup_pcie_rst_n),
    .bdf_id               (wup_bdf_id),
    .cq_tdata             (wup_cq_tdata),
    .cq_tvalid            (wup_cq_tvalid),
    .cq_tlast             (wup_cq_tlast),
    .cq_tready            (wup_cq_tready),
    .cc_tdata             (wup_cc_tdata),
    .cc_tvalid            (wup_cc_tvalid),
    .cc_tlast             (wup_cc_tlast),
    .cc_tready            (wup_cc_tready),
    .rq_tdata             (wup_rq_tdata),
    .rq_tvalid            (wup_rq_tvalid),
    .rq_tlast             (wup_rq_tlast),
    .rq_tready            (wup_rq_tready),
    .rc_tdata             (wup_rc_tdata),
    .rc_tvalid            (wup_rc_tvalid),
    .rc_tlast             (wup_rc_tlast),
    .rc_tready            (wup_rc_tready),
    .fifo_clk             (wup_fifo_clk),
    .fifo_rst_n           (wup_fifo_rst_n),
    .lost_frames          (wup_lost_frames),
    .sync_clk             (wup_sync_clk),
    .sync_rst_n           (wup_sync_rst_n),
    .register_map_control (wup_register_map_control),
    .register_map_monitor (wup_register_map_monitor)
  );

endmodule
