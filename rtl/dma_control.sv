// DMA control of one Wupper endpoint: register map, completion process,
// descriptors and address pointers.
//
// The host programs the DMA engine by writing and reading 32-bit registers
// in the endpoint's memory BAR. Those accesses arrive as transaction-layer
// packets (TLPs) on the completer-request stream (cq): a memory write is a
// 3- or 4-DW header followed by one data DW, a memory read is a header
// alone. This block decodes them (Fmt/Type, Length, Requester ID, Tag, byte
// enables, address), updates or reads the register, and for every read
// returns a completion-with-data TLP on the completer-completion stream
// (cc): DW0 Fmt/Type 0x4A and Length 1, DW1 completer ID, status, BCM and
// byte count, DW2 requester ID, tag and the lower 7 address bits, DW3 the
// data. A read of more than one DW, or of any other request type that
// needs an answer, is completed with "unsupported request" status and no
// data. Example: after the write 0x40000001 0x0000000f 0xfdaff040 0xf0e1f2c3
// (BAR offset 0x040), the read request 0x00000001 0x00000c0f 0xfdaff040
// with completer ID 0x0100 gives 0x4a000001 0x01000004 0x00000c40
// 0xf0e1f2c3.
//
// Descriptors: descriptor 0 moves data to the host (ToHost), descriptor 1
// from the host (FromHost). Each has a start and an end byte address
// (64 bit), a TLP length in DWs and a wrap-around (circular buffer) flag.
// Setting a descriptor's enable bit loads its current pointer with the
// start address. dma_read_write reports each finished TLP with tlp_done;
// the pointer then advances by the TLP length. When the next TLP would pass
// the end address the descriptor either wraps to its start (circular mode,
// and the wrap is counted) or finishes: its enable clears and its done bit
// sets. Status (done bits, current pointers, wrap counts) can be read back.
//
// Register map (byte offsets in the BAR, 32-bit registers):
//   0x000 + 0x20*d  start address low / 0x004 high      (descriptor d)
//   0x008 + 0x20*d  end address low   / 0x00C high
//   0x010 + 0x20*d  bits 10:0 TLP length in DW (multiple of 16), bit 12 wrap
//   0x100           enable, bit d for descriptor d (write 1 starts it)
//   0x104           done, bit d (read only)
//   0x110 + 8*d     current pointer low / high (read only)
//   0x120 + 4*d     wrap count (read only)
//   0x040           register_map_control (read/write, to user logic)
//   0x044           register_map_monitor (read only, from user logic)
// The host writes single DWs; only writes with all four byte enables set
// change a register.
//
// Streams (cq in, cc out) carry one TLP per beat: DW0 of the header in bits
// 31:0, the next DW in 63:32 and so on, valid/ready handshake, last marks
// the final beat. cq TLPs longer than one beat are dropped.
//
// What the block does (descriptors parsed and handed to the engine, status
// read back, pointer advanced per TLP within the descriptor's range,
// circular buffer on request, register map with external registers) and the
// TLP field layout follow the design this implements; register offsets,
// field positions and the one-TLP-per-beat stream format are this design's
// choices.
module dma_control
  import pcie_fft_pkg::*;
#(
  parameter int unsigned BUS_W  = WUP_BUS_W,
  parameter int unsigned NDESC  = 2,
  parameter int unsigned BAR_AW = 12          // BAR size 4 KiB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       completer_id,     // bus/device/function of this endpoint
  // completer request stream (host -> card)
  input  logic [BUS_W-1:0]  cq_tdata,
  input  logic              cq_tvalid,
  input  logic              cq_tlast,
  output logic              cq_tready,
  // completer completion stream (card -> host)
  output logic [BUS_W-1:0]  cc_tdata,
  output logic              cc_tvalid,
  output logic              cc_tlast,
  input  logic              cc_tready,
  // descriptors to dma_read_write
  output logic [63:0]       desc_addr   [NDESC],  // current pointer
  output logic [10:0]       desc_len_dw [NDESC],
  output logic [NDESC-1:0]  desc_active,
  input  logic [NDESC-1:0]  tlp_done,
  // external registers
  output logic [31:0]       register_map_control,
  input  logic [31:0]       register_map_monitor
);

  // ---------------- descriptor registers ----------------
  logic [63:0]      d_start [NDESC];
  logic [63:0]      d_end   [NDESC];
  logic [10:0]      d_len   [NDESC];
  logic             d_wrap  [NDESC];
  logic [31:0]      d_wraps [NDESC];
  logic [NDESC-1:0] d_done;

  // ---------------- request decode ----------------
  logic [31:0]  dw [4];
  tlp_req_hdr_t hdr;
  logic         is_4dw, is_wr, is_rd, hdr_ok;
  logic [31:0]  wr_data;

  for (genvar i = 0; i < 4; i++) begin : g_dw
    assign dw[i] = cq_tdata[32*i +: 32];
  end

  always_comb begin
    hdr.fmt_type = tlp_fmt_type_e'(dw[0][31:24]);
    hdr.length   = dw[0][9:0];
    hdr.req_id   = dw[1][31:16];
    hdr.tag      = dw[1][15:8];
    hdr.last_be  = dw[1][7:4];
    hdr.first_be = dw[1][3:0];
    is_4dw       = dw[0][29];
    hdr.addr     = is_4dw ? {dw[2], dw[3][31:2], 2'b00} : {32'h0, dw[2][31:2], 2'b00};
    is_wr        = (dw[0][31:24] == TLP_MWR32) || (dw[0][31:24] == TLP_MWR64);
    is_rd        = (dw[0][31:24] == TLP_MRD32) || (dw[0][31:24] == TLP_MRD64);
    hdr_ok       = (hdr.length == 10'd1);
    wr_data      = is_4dw ? cq_tdata[32*4 +: 32] : cq_tdata[32*3 +: 32];
  end

  // byte count and lower address of a single-DW read (PCIe byte-count rules)
  function automatic logic [11:0] byte_count_1dw(input logic [3:0] be);
    casez (be)
      4'b1??1: return 12'd4;
      4'b01?1, 4'b1?10: return 12'd3;
      4'b0011, 4'b0110, 4'b1100: return 12'd2;
      default: return 12'd1;
    endcase
  endfunction

  function automatic logic [1:0] first_byte(input logic [3:0] be);
    casez (be)
      4'b???1: return 2'd0;
      4'b??10: return 2'd1;
      4'b?100: return 2'd2;
      4'b1000: return 2'd3;
      default: return 2'd0;
    endcase
  endfunction

  // ---------------- register read ----------------
  function automatic logic [31:0] reg_read(input logic [BAR_AW-1:0] a);
    logic [31:0] r;
    r = '0;
    for (int d = 0; d < NDESC; d++) begin
      if (a == BAR_AW'(32*d + 'h00)) r = d_start[d][31:0];
      if (a == BAR_AW'(32*d + 'h04)) r = d_start[d][63:32];
      if (a == BAR_AW'(32*d + 'h08)) r = d_end[d][31:0];
      if (a == BAR_AW'(32*d + 'h0C)) r = d_end[d][63:32];
      if (a == BAR_AW'(32*d + 'h10)) r = {19'h0, d_wrap[d], 1'b0, d_len[d]};
      if (a == BAR_AW'('h110 + 8*d)) r = desc_addr[d][31:0];
      if (a == BAR_AW'('h114 + 8*d)) r = desc_addr[d][63:32];
      if (a == BAR_AW'('h120 + 4*d)) r = d_wraps[d];
    end
    if (a == BAR_AW'('h100)) r = 32'(desc_active);
    if (a == BAR_AW'('h104)) r = 32'(d_done);
    if (a == BAR_AW'('h040)) r = register_map_control;
    if (a == BAR_AW'('h044)) r = register_map_monitor;
    return r;
  endfunction

  // ---------------- completion process ----------------
  logic [BAR_AW-1:0] reg_a;
  logic              take, do_write;
  assign reg_a     = hdr.addr[BAR_AW-1:0];
  assign cq_tready = !cc_tvalid || cc_tready;
  assign take      = cq_tvalid && cq_tready;
  // a request is acted on only if it fits in one beat
  logic in_long;   // inside a multi-beat TLP being dropped
  assign do_write  = take && !in_long && cq_tlast && is_wr && hdr_ok && (hdr.first_be == 4'hF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc_tvalid <= 1'b0;
      cc_tlast  <= 1'b0;
      cc_tdata  <= '0;
      in_long   <= 1'b0;
    end else begin
      if (cc_tvalid && cc_tready) cc_tvalid <= 1'b0;
      if (take) begin
        in_long <= !cq_tlast;
        if (!in_long && cq_tlast && is_rd) begin
          cc_tvalid <= 1'b1;
          cc_tlast  <= 1'b1;
          cc_tdata  <= '0;
          if (hdr_ok) begin
            cc_tdata[31:0]   <= tlp_dw0(TLP_CPLD, 10'd1);
            cc_tdata[63:32]  <= {completer_id, CPL_SC, 1'b0, byte_count_1dw(hdr.first_be)};
            cc_tdata[95:64]  <= {hdr.req_id, hdr.tag, 1'b0, hdr.addr[6:2], first_byte(hdr.first_be)};
            cc_tdata[127:96] <= reg_read(reg_a);
          end else begin
            cc_tdata[31:0]   <= tlp_dw0(TLP_CPL, 10'd0);
            cc_tdata[63:32]  <= {completer_id, CPL_UR, 1'b0, 12'd0};
            cc_tdata[95:64]  <= {hdr.req_id, hdr.tag, 1'b0, hdr.addr[6:0]};
          end
        end
      end
    end
  end

  // ---------------- register writes and descriptor pointers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDESC; d++) begin
        d_start[d]   <= '0;
        d_end[d]     <= '0;
        d_len[d]     <= 11'd64;
        d_wrap[d]    <= 1'b0;
        d_wraps[d]   <= '0;
        desc_addr[d] <= '0;
      end
      desc_active          <= '0;
      d_done               <= '0;
      register_map_control <= '0;
    end else begin
      for (int d = 0; d < NDESC; d++) begin
        if (tlp_done[d] && desc_active[d]) begin
          if (desc_addr[d] + 64'(2 * d_len[d]) * 64'd4 > d_end[d]) begin
            if (d_wrap[d]) begin
              desc_addr[d] <= d_start[d];
              d_wraps[d]   <= d_wraps[d] + 1'b1;
            end else begin
              desc_addr[d]   <= desc_addr[d] + 64'(d_len[d]) * 64'd4;
              desc_active[d] <= 1'b0;
              d_done[d]      <= 1'b1;
            end
          end else begin
            desc_addr[d] <= desc_addr[d] + 64'(d_len[d]) * 64'd4;
          end
        end
      end
      if (do_write) begin
        for (int d = 0; d < NDESC; d++) begin
          if (reg_a == BAR_AW'(32*d + 'h00)) d_start[d][31:0]  <= wr_data;
          if (reg_a == BAR_AW'(32*d + 'h04)) d_start[d][63:32] <= wr_data;
          if (reg_a == BAR_AW'(32*d + 'h08)) d_end[d][31:0]    <= wr_data;
          if (reg_a == BAR_AW'(32*d + 'h0C)) d_end[d][63:32]   <= wr_data;
          if (reg_a == BAR_AW'(32*d + 'h10)) begin
            d_len[d]  <= wr_data[10:0];
            d_wrap[d] <= wr_data[12];
          end
        end
        if (reg_a == BAR_AW'('h100)) begin
          for (int d = 0; d < NDESC; d++) begin
            if (wr_data[d]) begin
              desc_active[d] <= 1'b1;
              d_done[d]      <= 1'b0;
              desc_addr[d]   <= d_start[d];
              d_wraps[d]     <= '0;
            end else begin
              desc_active[d] <= 1'b0;
            end
          end
        end
        if (reg_a == BAR_AW'('h040)) register_map_control <= wr_data;
      end
    end
  end

  assign desc_len_dw = d_len;

  a_cc_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              cc_tvalid && !cc_tready |=> cc_tvalid && $stable(cc_tdata));

  logic unused;
  assign unused = ^{hdr.last_be, hdr.addr[63:BAR_AW]};

endmodule
