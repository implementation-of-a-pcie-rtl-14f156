// Reset synchroniser, one per clock domain.
//
// The design has several clock domains (PCIe user clock, FFT clock) and
// both synchronous and asynchronous reset sources; every domain gets its
// reset through one of these. The output asserts (goes low) as soon as
// the input reset asserts, without waiting for a clock, and is released
// only after STAGES rising edges of the local clock with the input
// released, so that all flip-flops of the domain leave reset on the same
// edge. Active-low in and out. The number of stages is this design's
// choice.
module reset_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic arst_n,   // asynchronous reset in, active low
  output logic rst_n     // synchronised reset out, active low
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync_q <= '0;
    else         sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n = sync_q[STAGES-1];

endmodule
