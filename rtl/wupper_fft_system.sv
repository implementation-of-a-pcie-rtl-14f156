// Wupper-based FFT test bench (FPGA side), two PCIe endpoints.
//
// The PCIe x16 slot is split (bifurcated) into two independent x8
// endpoints. Each has its own DMA core (wupper_core), a fromHost FIFO and a
// toHost FIFO, all 512 bits wide. The 32-point, 32-parallel FFT needs 1024
// bits per frame: endpoint 0 carries the 32 real parts (low 512 bits of
// In_FFT/Out_FFT) and endpoint 1 the 32 imaginary parts (high 512 bits).
// Because the two halves of a frame travel separately, the FFT handshake
// is built from both FIFO pairs:
//   valid_in  = fromHost FIFO 0 not empty AND fromHost FIFO 1 not empty
//   ready_out = toHost FIFO 0 not prog_full AND toHost FIFO 1 not prog_full
// A frame is taken (both fromHost FIFOs read together) whenever both hold
// a half; the result leaves 19 cycles later and is written into both toHost
// FIFOs. prog_full leaves room for the frames still inside the FFT; if the
// host stops draining the toHost FIFOs, results that find a FIFO full are
// lost (lost_frames counts them).
//
// Clocks: each endpoint's DMA core and the PCIe side of its FIFOs run on
// that endpoint's user clock (pcie_clk[i]); the FFT and the other side of
// the FIFOs on fifo_clk. Endpoint 0's register map has a control and a
// monitor word that reach the user side through the register map
// synchroniser on sync_clk.
//
// The two endpoints, the split of the FFT bus into real and imaginary
// halves, the 19-cycle FFT and the valid_in/ready_out equations follow the
// design this implements; FIFO depths and thresholds, the reset scheme and
// the lost-frame counter are this design's choices.
module wupper_fft_system
  import pcie_fft_pkg::*;
#(
  parameter int unsigned BUS_W      = WUP_BUS_W,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned PROG_FULL  = 448,
  parameter int unsigned FFT_LAT    = FFT32_LAT
) (
  // per endpoint: user clock, reset, bus/device/function
  input  logic             pcie_clk   [2],
  input  logic             pcie_rst_n [2],
  input  logic [15:0]      bdf_id     [2],
  // completer streams
  input  logic [BUS_W-1:0] cq_tdata   [2],
  input  logic             cq_tvalid  [2],
  input  logic             cq_tlast   [2],
  output logic             cq_tready  [2],
  output logic [BUS_W-1:0] cc_tdata   [2],
  output logic             cc_tvalid  [2],
  output logic             cc_tlast   [2],
  input  logic             cc_tready  [2],
  // requester streams
  output logic [BUS_W-1:0] rq_tdata   [2],
  output logic             rq_tvalid  [2],
  output logic             rq_tlast   [2],
  input  logic             rq_tready  [2],
  input  logic [BUS_W-1:0] rc_tdata   [2],
  input  logic             rc_tvalid  [2],
  input  logic             rc_tlast   [2],
  output logic             rc_tready  [2],
  // FFT / FIFO clock
  input  logic             fifo_clk,
  input  logic             fifo_rst_n,
  output logic [31:0]      lost_frames,
  // user register side
  input  logic             sync_clk,
  input  logic             sync_rst_n,
  output logic [31:0]      register_map_control,
  input  logic [31:0]      register_map_monitor
);

  localparam int unsigned NPT = BUS_W / SAMPLE_W;   // 32 points

  logic             fifo_rst_sync_n;
  logic [2*BUS_W-1:0] in_fft, out_fft;
  logic             valid_in, ready_in, valid_out, ready_out;
  logic [1:0]       fh_empty, th_pfull, th_full;
  logic [BUS_W-1:0] fh_dout [2];

  reset_sync u_rst_fifo (.clk(fifo_clk), .arst_n(fifo_rst_n), .rst_n(fifo_rst_sync_n));

  logic [31:0] ctrl_pcie, mon_pcie;

  for (genvar i = 0; i < 2; i++) begin : g_ep
    logic             rst_n;
    logic [BUS_W-1:0] th_tdata, fh_tdata;
    logic             th_tvalid, th_tready, fh_tvalid, fh_tready, fh_pfull;
    logic             fh_full, th_empty, fh_m_valid, th_s_ready;
    logic [31:0]      ctrl;

    reset_sync u_rst (.clk(pcie_clk[i]), .arst_n(pcie_rst_n[i] && fifo_rst_n), .rst_n(rst_n));

    wupper_core #(.BUS_W(BUS_W)) u_core (
      .clk                  (pcie_clk[i]),
      .rst_n                (rst_n),
      .bdf_id               (bdf_id[i]),
      .cq_tdata             (cq_tdata[i]),
      .cq_tvalid            (cq_tvalid[i]),
      .cq_tlast             (cq_tlast[i]),
      .cq_tready            (cq_tready[i]),
      .cc_tdata             (cc_tdata[i]),
      .cc_tvalid            (cc_tvalid[i]),
      .cc_tlast             (cc_tlast[i]),
      .cc_tready            (cc_tready[i]),
      .rq_tdata             (rq_tdata[i]),
      .rq_tvalid            (rq_tvalid[i]),
      .rq_tlast             (rq_tlast[i]),
      .rq_tready            (rq_tready[i]),
      .rc_tdata             (rc_tdata[i]),
      .rc_tvalid            (rc_tvalid[i]),
      .rc_tlast             (rc_tlast[i]),
      .rc_tready            (rc_tready[i]),
      .th_tdata             (th_tdata),
      .th_tvalid            (th_tvalid),
      .th_tready            (th_tready),
      .fh_tdata             (fh_tdata),
      .fh_tvalid            (fh_tvalid),
      .fh_tready            (fh_tready),
      .fh_almost_full       (fh_pfull),
      .register_map_control (ctrl),
      .register_map_monitor (mon_pcie)
    );

    if (i == 0) begin : g_ctrl
      assign ctrl_pcie = ctrl;
    end else begin : g_noctrl
      logic [31:0] unused_ctrl;
      assign unused_ctrl = ctrl;
    end

    // fromHost FIFO: PCIe clock -> FIFO clock
    axis_async_fifo #(.DATA_W(BUS_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(PROG_FULL)) u_fromhost (
      .s_aclk    (pcie_clk[i]),
      .s_aresetn (rst_n),
      .s_tdata   (fh_tdata),
      .s_tvalid  (fh_tvalid),
      .s_tready  (fh_tready),
      .prog_full (fh_pfull),
      .full      (fh_full),
      .m_aclk    (fifo_clk),
      .m_tdata   (fh_dout[i]),
      .m_tvalid  (fh_m_valid),
      .m_tready  (valid_in && ready_in),
      .empty     (fh_empty[i])
    );

    // toHost FIFO: FIFO clock -> PCIe clock
    axis_async_fifo #(.DATA_W(BUS_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(PROG_FULL)) u_tohost (
      .s_aclk    (fifo_clk),
      .s_aresetn (fifo_rst_sync_n),
      .s_tdata   (out_fft[BUS_W*i +: BUS_W]),
      .s_tvalid  (valid_out),
      .s_tready  (th_s_ready),
      .prog_full (th_pfull[i]),
      .full      (th_full[i]),
      .m_aclk    (pcie_clk[i]),
      .m_tdata   (th_tdata),
      .m_tvalid  (th_tvalid),
      .m_tready  (th_tready),
      .empty     (th_empty)
    );

    assign in_fft[BUS_W*i +: BUS_W] = fh_dout[i];

    logic unused_flags;
    assign unused_flags = ^{fh_full, th_empty, fh_m_valid, th_s_ready};
  end

  // the two halves of a frame move together
  assign valid_in  = !fh_empty[0] && !fh_empty[1];
  assign ready_out = !th_pfull[0] && !th_pfull[1];

  fpfft32_top #(.N(NPT), .LAT(FFT_LAT)) u_fft (
    .clk       (fifo_clk),
    .rst       (fifo_rst_sync_n),
    .valid_in  (valid_in),
    .ready_in  (ready_in),
    .In_FFT    (in_fft),
    .valid_out (valid_out),
    .ready_out (ready_out),
    .Out_FFT   (out_fft)
  );

  always_ff @(posedge fifo_clk or negedge fifo_rst_sync_n) begin
    if (!fifo_rst_sync_n)                    lost_frames <= '0;
    else if (valid_out && (|th_full))        lost_frames <= lost_frames + 1'b1;
  end

  register_map_sync u_regsync (
    .pcie_clk             (pcie_clk[0]),
    .pcie_rst_n           (g_ep[0].rst_n),
    .sync_clk             (sync_clk),
    .sync_rst_n           (sync_rst_n),
    .ctrl_pcie            (ctrl_pcie),
    .mon_pcie             (mon_pcie),
    .register_map_control (register_map_control),
    .register_map_monitor (register_map_monitor)
  );

endmodule
