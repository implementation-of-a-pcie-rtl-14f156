// Multi-bit clock-domain crossing by toggle handshake.
//
// Carries a W-bit word from src_clk to dst_clk. The source captures its
// input into a holding register and flips a request toggle; the toggle
// crosses through two flip-flops, the destination copies the (by then
// stable) holding register and flips an acknowledge toggle back. The source
// captures a new value only after the acknowledge has returned, so the
// destination never sees a word in transition. The destination copy
// follows the source within a few cycles of both clocks; values that
// change faster than that are sampled, not queued. Both resets are
// active low and clear the copy to zero.
module cdc_word #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data
);

  logic [W-1:0] hold;
  logic         req_t, ack_s1, ack_s2;      // source domain
  logic         ack_t, req_s1, req_s2;      // destination domain

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold   <= '0;
      req_t  <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      if (ack_s2 == req_t) begin      // previous word delivered
        hold  <= src_data;
        req_t <= ~req_t;
      end
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_data <= '0;
      ack_t    <= 1'b0;
      req_s1   <= 1'b0;
      req_s2   <= 1'b0;
    end else begin
      req_s1 <= req_t;
      req_s2 <= req_s1;
      if (req_s2 != ack_t) begin
        dst_data <= hold;
        ack_t    <= req_s2;
      end
    end
  end

endmodule
