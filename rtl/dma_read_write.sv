// DMA read/write engine of one Wupper endpoint.
//
// Two processes share the endpoint's requester streams.
//
// ToHost (descriptor 0): while the descriptor is active and the toHost FIFO
// holds data, a memory-write TLP is built for the descriptor's current
// address: a header (3 DW for addresses below 4 GiB, 4 DW above, Length =
// the descriptor's TLP length, requester ID, a tag, byte enables 0xF/0xF)
// followed by TLP-length/16 FIFO words as payload. The payload is packed
// right behind the header, so every output beat carries the low part of one
// FIFO word and the high part of the previous one (the header in the first
// beat); a TLP of L words takes L+1 beats, the last holding only the last
// 3 or 4 DWs. If the FIFO runs empty inside a TLP the stream simply pauses.
//
// FromHost (descriptor 1): while the descriptor is active and the fromHost
// FIFO is not almost full, a memory-read TLP (header only, one beat) asks
// the host for TLP-length DWs at the current address. Its completion comes
// back on the requester-completion stream as a 3-DW completion header and
// the payload packed behind it; the header is checked (completion with
// data, successful status, matching tag) and stripped, and the payload is
// realigned into whole 512-bit words and shifted into the fromHost FIFO.
// One read is outstanding at a time, so completions arrive in request order
// and no reordering memory is needed; a bad completion is dropped and the
// read is issued again.
//
// Each finished TLP (last write beat sent, or last completion beat taken)
// is reported to dma_control on tlp_done[d], which advances the pointer.
// When both processes want the request stream, they take turns.
//
// Streams: one TLP per packet, DW0 of the header in bits 31:0, valid/ready
// handshake, last on the final beat. The TLP length must be a multiple of
// 16 DW (one FIFO word), at most 1024 (written as 0 in the header).
//
// Header construction for ToHost, header stripping for FromHost and the
// FIFO connections follow the design this implements; the packing, the
// single outstanding read and the error handling are this design's
// choices (the design it follows sorts completions in a memory instead).
module dma_read_write
  import pcie_fft_pkg::*;
#(
  parameter int unsigned BUS_W = WUP_BUS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       requester_id,
  // descriptors (0 = ToHost, 1 = FromHost)
  input  logic [63:0]       desc_addr   [2],
  input  logic [10:0]       desc_len_dw [2],
  input  logic [1:0]        desc_active,
  output logic [1:0]        tlp_done,
  // toHost FIFO read side
  input  logic [BUS_W-1:0]  th_tdata,
  input  logic              th_tvalid,
  output logic              th_tready,
  // fromHost FIFO write side
  output logic [BUS_W-1:0]  fh_tdata,
  output logic              fh_tvalid,
  input  logic              fh_tready,
  input  logic              fh_almost_full,
  // requester request stream (card -> host)
  output logic [BUS_W-1:0]  rq_tdata,
  output logic              rq_tvalid,
  output logic              rq_tlast,
  input  logic              rq_tready,
  // requester completion stream (host -> card)
  input  logic [BUS_W-1:0]  rc_tdata,
  input  logic              rc_tvalid,
  input  logic              rc_tlast,
  output logic              rc_tready
);

  localparam int unsigned DWB = BUS_W / 32;     // DWs per beat (16)

  typedef enum logic [1:0] {RQ_IDLE, RQ_WRITE, RQ_READ} rq_state_e;
  rq_state_e rq_state;

  // ---------------- ToHost: memory write ----------------
  logic [10:0]      wr_words;     // FIFO words still to send
  logic             wr_4dw;
  logic [4:0]       wr_tag;
  logic [127:0]     carry;        // header, then the high DWs of the last word
  logic             prio_read;    // round-robin between write and read

  function automatic logic [127:0] mwr_header(input logic [63:0] a, input logic [10:0] len,
                                              input logic [15:0] rid, input logic [7:0] tag);
    logic [127:0] h;
    h = '0;
    if (a[63:32] == '0) begin
      h[31:0]  = tlp_dw0(TLP_MWR32, len[9:0]);
      h[63:32] = tlp_req_dw1(rid, tag, 4'hF, 4'hF);
      h[95:64] = {a[31:2], 2'b00};
    end else begin
      h[31:0]   = tlp_dw0(TLP_MWR64, len[9:0]);
      h[63:32]  = tlp_req_dw1(rid, tag, 4'hF, 4'hF);
      h[95:64]  = a[63:32];
      h[127:96] = {a[31:2], 2'b00};
    end
    return h;
  endfunction

  function automatic logic [127:0] mrd_header(input logic [63:0] a, input logic [10:0] len,
                                              input logic [15:0] rid, input logic [7:0] tag);
    logic [127:0] h;
    h = mwr_header(a, len, rid, tag);
    h[30] = 1'b0;                       // Fmt: no data
    return h;
  endfunction

  // output beat while writing: word shifted up behind the 3 or 4 carried DWs
  logic [BUS_W-1:0] wr_beat;
  logic             wr_last_beat;     // the beat that only flushes the carry
  always_comb begin
    if (wr_4dw) wr_beat = {(wr_last_beat ? '0 : th_tdata[BUS_W-128-1:0]), carry[127:0]};
    else        wr_beat = {(wr_last_beat ? '0 : th_tdata[BUS_W-96-1:0]),  carry[95:0]};
  end
  assign wr_last_beat = (wr_words == '0);

  // ---------------- FromHost: memory read and completion ----------------
  logic        rd_outstanding;
  logic [4:0]  rd_tag;
  logic        cpl_first;          // next rc beat is the header beat
  logic        cpl_bad;
  logic [BUS_W-96-1:0] cpl_carry;  // payload DWs 0..12 of the current word

  logic cpl_hdr_ok;
  assign cpl_hdr_ok = (rc_tdata[31:24] == TLP_CPLD) && (rc_tdata[47:45] == CPL_SC) &&
                      (rc_tdata[79:72] == {3'b000, rd_tag});

  // ---------------- request stream ----------------
  logic want_wr, want_rd;
  assign want_wr = desc_active[0] && th_tvalid;
  assign want_rd = desc_active[1] && !rd_outstanding && !fh_almost_full;

  always_comb begin
    rq_tvalid = 1'b0;
    rq_tlast  = 1'b0;
    rq_tdata  = '0;
    th_tready = 1'b0;
    unique case (rq_state)
      RQ_WRITE: begin
        rq_tvalid = wr_last_beat || th_tvalid;
        rq_tlast  = wr_last_beat;
        rq_tdata  = wr_beat;
        th_tready = !wr_last_beat && rq_tready;
      end
      RQ_READ: begin
        rq_tvalid = 1'b1;
        rq_tlast  = 1'b1;
        rq_tdata  = {(BUS_W-128)'(0), mrd_header(desc_addr[1], desc_len_dw[1], requester_id, {3'b000, rd_tag})};
      end
      default: ;
    endcase
  end

  // completion side
  always_comb begin
    fh_tvalid = 1'b0;
    fh_tdata  = {rc_tdata[95:0], cpl_carry};
    rc_tready = 1'b1;
    if (rc_tvalid && !cpl_first && !cpl_bad) begin
      fh_tvalid = 1'b1;
      rc_tready = fh_tready;
    end
  end

  assign tlp_done[0] = (rq_state == RQ_WRITE) && wr_last_beat && rq_tready;
  assign tlp_done[1] = rc_tvalid && rc_tready && rc_tlast && !cpl_first && !cpl_bad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_state       <= RQ_IDLE;
      wr_words       <= '0;
      wr_4dw         <= 1'b0;
      wr_tag         <= '0;
      carry          <= '0;
      prio_read      <= 1'b0;
      rd_outstanding <= 1'b0;
      rd_tag         <= '0;
      cpl_first      <= 1'b1;
      cpl_bad        <= 1'b0;
      cpl_carry      <= '0;
    end else begin
      // request side
      unique case (rq_state)
        RQ_IDLE: begin
          if (want_wr && (!want_rd || !prio_read)) begin
            rq_state  <= RQ_WRITE;
            wr_words  <= desc_len_dw[0] / 11'(DWB);
            wr_4dw    <= (desc_addr[0][63:32] != '0);
            carry     <= mwr_header(desc_addr[0], desc_len_dw[0], requester_id, {3'b000, wr_tag});
            wr_tag    <= wr_tag + 1'b1;
            prio_read <= 1'b1;
          end else if (want_rd) begin
            rq_state  <= RQ_READ;
            prio_read <= 1'b0;
          end
        end
        RQ_WRITE: begin
          if (rq_tvalid && rq_tready) begin
            if (wr_last_beat) rq_state <= RQ_IDLE;
            else begin
              wr_words <= wr_words - 1'b1;
              carry    <= wr_4dw ? th_tdata[BUS_W-1 -: 128] : {32'h0, th_tdata[BUS_W-1 -: 96]};
            end
          end
        end
        RQ_READ: begin
          if (rq_tready) begin
            rq_state       <= RQ_IDLE;
            rd_outstanding <= 1'b1;
          end
        end
        default: rq_state <= RQ_IDLE;
      endcase

      // completion side
      if (rc_tvalid && rc_tready) begin
        if (cpl_first) begin
          cpl_bad   <= !rd_outstanding || !cpl_hdr_ok;
          cpl_first <= rc_tlast;
        end else if (rc_tlast) begin
          cpl_first <= 1'b1;
          cpl_bad   <= 1'b0;
        end
        cpl_carry <= rc_tdata[BUS_W-1:96];
        if (rc_tlast && (!cpl_first || !cpl_hdr_ok) && rd_outstanding) begin
          // request finished: good data in, or a bad completion to retry
          rd_outstanding <= 1'b0;
          if (!cpl_bad && !cpl_first) rd_tag <= rd_tag + 1'b1;
        end
      end
    end
  end


  a_rq_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              rq_tvalid && !rq_tready |=> rq_tvalid && $stable(rq_tdata));

endmodule
