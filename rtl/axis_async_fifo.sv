// Dual-clock AXI4-Stream FIFO.
//
// Bridges a stream between two unrelated clocks: the PCIe/DMA side and the
// FFT side. It is used for both FIFOs of the XDMA-based system (H2C data to
// the FFT, FFT results to C2H) and for the toHost and fromHost FIFOs of each
// Wupper endpoint.
//
// How it works: a DEPTH-entry memory is written in the s_aclk domain and
// read in the m_aclk domain. Each side keeps a binary pointer one bit wider
// than the address and publishes it in Gray code; the other side brings it
// over through two flip-flops. Full is decided on the write side and empty
// on the read side from the local pointer and the synchronised remote one,
// so both flags are conservative and never wrong. The read side is
// first-word-fall-through: m_tdata shows the oldest entry whenever m_tvalid
// is high. prog_full (write side) rises when the write-side fill count
// reaches PROG_FULL; the Wupper design uses it, not full, as the FFT's
// ready, so frames still in flight in the FFT pipeline find room.
//
// Interface: AXI4-Stream tdata/tvalid/tready on both sides, a beat moves
// when valid and ready are both high on a rising edge. s_aresetn (active
// low, s_aclk domain, as on the FIFO block it replaces) resets both
// pointers; it is synchronised into the m_aclk domain internally.
//
// The width follows the 512-bit streams of the design; the depth, the
// prog_full threshold and the Gray-pointer scheme are this design's choices.
module axis_async_fifo #(
  parameter int unsigned DATA_W    = 512,
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned PROG_FULL = 480
) (
  // write side
  input  logic              s_aclk,
  input  logic              s_aresetn,
  input  logic [DATA_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  output logic              prog_full,
  output logic              full,
  // read side
  input  logic              m_aclk,
  output logic [DATA_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_s1, rd_gray_s2;   // read pointer seen by the writer
  logic [AW:0] wr_gray_s1, wr_gray_s2;   // write pointer seen by the reader
  logic        m_rst_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rd_bin_w, fill_w;
  logic        wr_en;

  assign rd_bin_w  = gray2bin(rd_gray_s2);
  assign fill_w    = wr_bin - rd_bin_w;
  assign full      = (fill_w == (AW+1)'(DEPTH));
  assign prog_full = (fill_w >= (AW+1)'(PROG_FULL));
  assign s_tready  = !full && s_aresetn;
  assign wr_en     = s_tvalid && s_tready;

  always_ff @(posedge s_aclk or negedge s_aresetn) begin
    if (!s_aresetn) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_s1 <= '0;
      rd_gray_s2 <= '0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
      if (wr_en) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge s_aclk) begin
    if (wr_en) mem[wr_bin[AW-1:0]] <= s_tdata;
  end

  // ---------------- read domain ----------------
  reset_sync #(.STAGES(2)) u_m_rst (
    .clk    (m_aclk),
    .arst_n (s_aresetn),
    .rst_n  (m_rst_n)
  );

  logic rd_en;
  assign empty    = (rd_gray == wr_gray_s2);
  assign m_tvalid = !empty;
  assign m_tdata  = mem[rd_bin[AW-1:0]];
  assign rd_en    = m_tvalid && m_tready;

  always_ff @(posedge m_aclk or negedge m_rst_n) begin
    if (!m_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
      if (rd_en) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  initial begin
    assert ((1 << AW) == DEPTH) else $error("DEPTH must be a power of two");
    assert (PROG_FULL <= DEPTH) else $error("PROG_FULL above DEPTH");
  end

endmodule
