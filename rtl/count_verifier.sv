// Valid-ready verifier with an AXI4-Lite register interface.
//
// Watches one valid/ready handshake (for example the FFT output and the
// FIFO behind it) and counts, while enabled:
//   lost        cycles with valid high and ready low: the producer cannot
//               hold its data, so that word is lost;
//   packets     packets seen: a packet is an unbroken run of valid words,
//               counted on the first word of each run;
//   transmitted words accepted (valid and ready high).
// The host reads the three counters and controls the verifier through
// four 32-bit registers on an AXI4-Lite slave:
//   0x0 control (write only, reads 0): bit 0 START(1)/STOP(0),
//       bit 1 reset counters (clears all three, self-clearing)
//   0x4 lost        (read only)
//   0x8 packets     (read only)
//   0xC transmitted (read only)
// Counters saturate at all ones. The monitored signals must be in the
// S_AXI_ACLK domain. A write and a read may be in flight at once; each
// AXI-Lite channel is answered with an OKAY response one cycle after both
// address and data (write) or the address (read) have been taken.
//
// Three read-only counters, one write-only register with a START/STOP bit
// and a counter-reset bit, and the port names follow the block this
// implements; the register offsets, the counter width, the saturation and
// the exact counting rules are this design's choices.
module count_verifier #(
  parameter int unsigned CNT_W = 32
) (
  input  logic        S_AXI_ACLK,
  input  logic        S_AXI_ARESETN,
  // monitored handshake
  input  logic        valid,
  input  logic        ready,
  // AXI4-Lite slave
  input  logic [3:0]  S_AXI_AWADDR,
  input  logic        S_AXI_AWVALID,
  output logic        S_AXI_AWREADY,
  input  logic [31:0] S_AXI_WDATA,
  input  logic [3:0]  S_AXI_WSTRB,
  input  logic        S_AXI_WVALID,
  output logic        S_AXI_WREADY,
  output logic [1:0]  S_AXI_BRESP,
  output logic        S_AXI_BVALID,
  input  logic        S_AXI_BREADY,
  input  logic [3:0]  S_AXI_ARADDR,
  input  logic        S_AXI_ARVALID,
  output logic        S_AXI_ARREADY,
  output logic [31:0] S_AXI_RDATA,
  output logic [1:0]  S_AXI_RRESP,
  output logic        S_AXI_RVALID,
  input  logic        S_AXI_RREADY
);

  typedef enum logic [1:0] {
    REG_CTRL  = 2'd0,
    REG_LOST  = 2'd1,
    REG_PKTS  = 2'd2,
    REG_XMIT  = 2'd3
  } reg_e;

  logic             run;
  logic             clr;
  logic             valid_q;
  logic [CNT_W-1:0] cnt_lost, cnt_pkts, cnt_xmit;

  // ---------------- counting ----------------
  function automatic logic [CNT_W-1:0] inc_sat(input logic [CNT_W-1:0] c);
    return (&c) ? c : c + 1'b1;
  endfunction

  always_ff @(posedge S_AXI_ACLK) begin
    if (!S_AXI_ARESETN || clr) begin
      cnt_lost <= '0;
      cnt_pkts <= '0;
      cnt_xmit <= '0;
      valid_q  <= 1'b0;
    end else begin
      valid_q <= valid;
      if (run) begin
        if (valid && !ready) cnt_lost <= inc_sat(cnt_lost);
        if (valid &&  ready) cnt_xmit <= inc_sat(cnt_xmit);
        if (valid && !valid_q) cnt_pkts <= inc_sat(cnt_pkts);
      end
    end
  end

  // ---------------- AXI4-Lite write channel ----------------
  logic aw_hold, w_hold;
  logic [3:0]  aw_addr;
  logic [31:0] w_data;
  logic [3:0]  w_strb;

  assign S_AXI_AWREADY = !aw_hold && !S_AXI_BVALID;
  assign S_AXI_WREADY  = !w_hold  && !S_AXI_BVALID;
  assign S_AXI_BRESP   = 2'b00;

  always_ff @(posedge S_AXI_ACLK) begin
    if (!S_AXI_ARESETN) begin
      aw_hold      <= 1'b0;
      w_hold       <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      S_AXI_BVALID <= 1'b0;
      run          <= 1'b0;
      clr          <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (S_AXI_AWVALID && S_AXI_AWREADY) begin
        aw_hold <= 1'b1;
        aw_addr <= S_AXI_AWADDR;
      end
      if (S_AXI_WVALID && S_AXI_WREADY) begin
        w_hold <= 1'b1;
        w_data <= S_AXI_WDATA;
        w_strb <= S_AXI_WSTRB;
      end
      if (aw_hold && w_hold) begin
        aw_hold      <= 1'b0;
        w_hold       <= 1'b0;
        S_AXI_BVALID <= 1'b1;
        if (reg_e'(aw_addr[3:2]) == REG_CTRL && w_strb[0]) begin
          run <= w_data[0];
          clr <= w_data[1];
        end
      end
      if (S_AXI_BVALID && S_AXI_BREADY) S_AXI_BVALID <= 1'b0;
    end
  end

  // ---------------- AXI4-Lite read channel ----------------
  assign S_AXI_ARREADY = !S_AXI_RVALID;
  assign S_AXI_RRESP   = 2'b00;

  always_ff @(posedge S_AXI_ACLK) begin
    if (!S_AXI_ARESETN) begin
      S_AXI_RVALID <= 1'b0;
      S_AXI_RDATA  <= '0;
    end else begin
      if (S_AXI_ARVALID && S_AXI_ARREADY) begin
        S_AXI_RVALID <= 1'b1;
        unique case (reg_e'(S_AXI_ARADDR[3:2]))
          REG_CTRL: S_AXI_RDATA <= '0;
          REG_LOST: S_AXI_RDATA <= 32'(cnt_lost);
          REG_PKTS: S_AXI_RDATA <= 32'(cnt_pkts);
          REG_XMIT: S_AXI_RDATA <= 32'(cnt_xmit);
        endcase
      end else if (S_AXI_RVALID && S_AXI_RREADY) begin
        S_AXI_RVALID <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid until it is taken
  property p_hold(v, r);
    @(posedge S_AXI_ACLK) disable iff (!S_AXI_ARESETN) v && !r |=> v;
  endproperty
  a_bvalid_hold: assert property (p_hold(S_AXI_BVALID, S_AXI_BREADY));
  a_rvalid_hold: assert property (p_hold(S_AXI_RVALID, S_AXI_RREADY));

  logic unused;
  assign unused = ^{S_AXI_AWADDR[1:0], S_AXI_ARADDR[1:0], aw_addr[1:0], w_data[31:2], w_strb[3:1]};

endmodule
