// Register map synchroniser.
//
// The DMA core keeps its register map in the PCIe user clock, while the
// user logic behind it runs on its own clock (sync_clk). This block passes
// the control word the host writes (register_map_control) into the
// sync_clk domain, and the monitor word the user logic reports
// (register_map_monitor) back into the PCIe clock domain, so that the host
// can read it. Each direction is a toggle-handshake word crossing
// (cdc_word): a change appears on the other side a few cycles of both
// clocks later, whole and never half-updated.
//
// That there is such a block between the register map and the user side,
// with a control output, a monitor input and a sync_clk, follows the design
// this implements; the width (one 32-bit word each way) and the handshake
// crossing are this design's choices.
module register_map_sync #(
  parameter int unsigned W = 32
) (
  input  logic         pcie_clk,
  input  logic         pcie_rst_n,
  input  logic         sync_clk,
  input  logic         sync_rst_n,
  // PCIe-clock side (register map read/write)
  input  logic [W-1:0] ctrl_pcie,
  output logic [W-1:0] mon_pcie,
  // sync_clk side (user logic)
  output logic [W-1:0] register_map_control,
  input  logic [W-1:0] register_map_monitor
);

  cdc_word #(.W(W)) u_ctrl (
    .src_clk   (pcie_clk),
    .src_rst_n (pcie_rst_n),
    .src_data  (ctrl_pcie),
    .dst_clk   (sync_clk),
    .dst_rst_n (sync_rst_n),
    .dst_data  (register_map_control)
  );

  cdc_word #(.W(W)) u_mon (
    .src_clk   (sync_clk),
    .src_rst_n (sync_rst_n),
    .src_data  (register_map_monitor),
    .dst_clk   (pcie_clk),
    .dst_rst_n (pcie_rst_n),
    .dst_data  (mon_pcie)
  );

endmodule
