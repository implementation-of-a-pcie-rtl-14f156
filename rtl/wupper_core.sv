// Wupper DMA core of one PCIe endpoint.
//
// Joins the two halves of the DMA engine. dma_control serves the host's
// register accesses (completer request/completion streams), keeps the two
// descriptors (0 = ToHost, 1 = FromHost) and their address pointers, and
// hands them to dma_read_write, which moves the data: toHost FIFO words out
// as memory-write TLPs, host memory into the fromHost FIFO through
// memory-read TLPs and their completions (requester request/completion
// streams). Each finished TLP is reported back so the pointer advances.
// All of it runs in the endpoint's PCIe user clock. The completer ID and
// the requester ID are both the endpoint's bus/device/function number, as
// assigned by the host.
//
// The split into dma_control and dma_read_write follows the design this
// implements; the interface between them is this design's own.
module wupper_core
  import pcie_fft_pkg::*;
#(
  parameter int unsigned BUS_W = WUP_BUS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      bdf_id,
  // completer streams
  input  logic [BUS_W-1:0] cq_tdata,
  input  logic             cq_tvalid,
  input  logic             cq_tlast,
  output logic             cq_tready,
  output logic [BUS_W-1:0] cc_tdata,
  output logic             cc_tvalid,
  output logic             cc_tlast,
  input  logic             cc_tready,
  // requester streams
  output logic [BUS_W-1:0] rq_tdata,
  output logic             rq_tvalid,
  output logic             rq_tlast,
  input  logic             rq_tready,
  input  logic [BUS_W-1:0] rc_tdata,
  input  logic             rc_tvalid,
  input  logic             rc_tlast,
  output logic             rc_tready,
  // FIFOs
  input  logic [BUS_W-1:0] th_tdata,
  input  logic             th_tvalid,
  output logic             th_tready,
  output logic [BUS_W-1:0] fh_tdata,
  output logic             fh_tvalid,
  input  logic             fh_tready,
  input  logic             fh_almost_full,
  // external registers
  output logic [31:0]      register_map_control,
  input  logic [31:0]      register_map_monitor
);

  logic [63:0] desc_addr   [2];
  logic [10:0] desc_len_dw [2];
  logic [1:0]  desc_active;
  logic [1:0]  tlp_done;

  dma_control #(.BUS_W(BUS_W), .NDESC(2)) u_control (
    .clk                  (clk),
    .rst_n                (rst_n),
    .completer_id         (bdf_id),
    .cq_tdata             (cq_tdata),
    .cq_tvalid            (cq_tvalid),
    .cq_tlast             (cq_tlast),
    .cq_tready            (cq_tready),
    .cc_tdata             (cc_tdata),
    .cc_tvalid            (cc_tvalid),
    .cc_tlast             (cc_tlast),
    .cc_tready            (cc_tready),
    .desc_addr            (desc_addr),
    .desc_len_dw          (desc_len_dw),
    .desc_active          (desc_active),
    .tlp_done             (tlp_done),
    .register_map_control (register_map_control),
    .register_map_monitor (register_map_monitor)
  );

  dma_read_write #(.BUS_W(BUS_W)) u_read_write (
    .clk            (clk),
    .rst_n          (rst_n),
    .requester_id   (bdf_id),
    .desc_addr      (desc_addr),
    .desc_len_dw    (desc_len_dw),
    .desc_active    (desc_active),
    .tlp_done       (tlp_done),
    .th_tdata       (th_tdata),
    .th_tvalid      (th_tvalid),
    .th_tready      (th_tready),
    .fh_tdata       (fh_tdata),
    .fh_tvalid      (fh_tvalid),
    .fh_tready      (fh_tready),
    .fh_almost_full (fh_almost_full),
    .rq_tdata       (rq_tdata),
    .rq_tvalid      (rq_tvalid),
    .rq_tlast       (rq_tlast),
    .rq_tready      (rq_tready),
    .rc_tdata       (rc_tdata),
    .rc_tvalid      (rc_tvalid),
    .rc_tlast       (rc_tlast),
    .rc_tready      (rc_tready)
  );

endmodule
