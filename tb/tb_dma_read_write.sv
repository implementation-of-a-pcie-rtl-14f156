// Testbench for dma_read_write. The testbench plays dma_control (it holds
// the descriptors and advances the pointer on each tlp_done), the toHost
// and fromHost FIFOs and the host (it collects request TLPs and answers
// memory reads with completions), all with random stalls.
// ToHost: 3 TLPs below 4 GiB (3-DW header) then 3 above (4-DW header); each
// memory-write TLP is taken apart here and its header fields (Fmt/Type,
// Length, requester ID, byte enables, address) and its payload (the FIFO
// words, in order) are checked. FromHost: 4 reads; each memory-read header
// is checked, and its completion carries host data whose words must reach
// the fromHost FIFO in order. One completion is sent with a wrong tag: it
// must be dropped and the read issued again.
module tb_dma_read_write;
  import pcie_fft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] requester_id = 16'h0300;
  logic [63:0] desc_addr [2];
  logic [10:0] desc_len_dw [2];
  logic [1:0]  desc_active = '0, tlp_done;
  logic [511:0] th_tdata = '0, fh_tdata, rq_tdata, rc_tdata = '0;
  logic th_tvalid = 0, th_tready, fh_tvalid, fh_tready = 0, fh_almost_full = 0;
  logic rq_tvalid, rq_tlast, rq_tready = 0, rc_tvalid = 0, rc_tlast = 0, rc_tready;

  always #20 clk = ~clk;

  dma_read_write dut (.*);

  int checks = 0, failures = 0;
  localparam int WR_TLPS = 6, RD_TLPS = 4, LEN = 32;   // 32 DW = 2 words

  logic [511:0] th_words [$];   // still to be offered
  logic [511:0] th_expect [$];  // expected in MWr payloads
  int wr_seen = 0, rd_seen = 0, fh_words = 0, bad_sent = 0, reissued = 0;
  int rd_done = 0, wr_done = 0;

  function automatic logic [31:0] host_dw(logic [63:0] byte_addr);
    return 32'(byte_addr[31:0] * 32'h01000193) ^ 32'hc0ffee00;
  endfunction

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // descriptor model
  always @(posedge clk) begin
    if (rst_n) begin
      if (tlp_done[0]) begin
        wr_done++;
        desc_addr[0] <= (wr_done == 3) ? 64'h2_0000_0000 : desc_addr[0] + LEN * 4;
        if (wr_done == WR_TLPS) desc_active[0] <= 0;
      end
      if (tlp_done[1]) begin
        rd_done++;
        desc_addr[1] <= desc_addr[1] + LEN * 4;
        if (rd_done == RD_TLPS) desc_active[1] <= 0;
      end
    end
  end

  // toHost FIFO model
  always @(posedge clk) begin
    // like a FIFO, valid stays high until the word is taken
    logic taken;
    taken = th_tvalid && th_tready;
    if (taken) void'(th_words.pop_front());
    #10;
    if (taken) th_tvalid = 0;
    if (!th_tvalid) th_tvalid = (th_words.size() > 0) && ($urandom_range(0, 3) != 0);
    th_tdata  = (th_words.size() > 0) ? th_words[0] : '0;
  end

  // request stream monitor
  logic [31:0] tlp [$];
  logic [31:0] pend_addr [$];
  logic [7:0]  pend_tag [$];
  always @(posedge clk) begin
    if (rq_tvalid && rq_tready) begin
      for (int i = 0; i < 16; i++) tlp.push_back(rq_tdata[32*i +: 32]);
      if (rq_tlast) begin
        logic [7:0] ft;
        int h;
        ft = tlp[0][31:24];
        h  = tlp[0][29] ? 4 : 3;
        chk(tlp[0][9:0], LEN, "Length");
        chk(tlp[1][31:16], 16'h0300, "requester ID");
        chk(tlp[1][7:0], 8'hFF, "byte enables");
        if (ft == TLP_MWR32 || ft == TLP_MWR64) begin
          logic [511:0] w;
          chk(ft, (wr_seen < 3) ? TLP_MWR32 : TLP_MWR64, "MWr header size");
          if (h == 3) chk(tlp[2], 32'h1000_0000 + wr_seen * LEN * 4, "MWr address");
          else begin chk(tlp[2], 32'h2, "MWr address high"); chk(tlp[3], (wr_seen - 3) * LEN * 4, "MWr address low"); end
          chk(tlp.size(), 16 * ((h + LEN + 15) / 16), "MWr beat count");
          for (int wd = 0; wd < LEN / 16; wd++) begin
            w = th_expect.pop_front();
            for (int i = 0; i < 16; i++) chk(tlp[h + 16*wd + i], w[32*i +: 32], "MWr payload");
          end
          wr_seen++;
        end else if (ft == TLP_MRD32) begin
          chk(tlp[2], 32'h3000 + rd_seen * LEN * 4, "MRd address");
          if (pend_tag.size() == 0 && bad_sent == 1 && reissued == 0) reissued = 1;
          pend_addr.push_back(tlp[2]);
          pend_tag.push_back(tlp[1][15:8]);
        end else begin
          failures++; $display("FAIL unexpected request %h", tlp[0]);
        end
        tlp.delete();
      end
    end
    #10 rq_tready = ($urandom_range(0, 3) != 0);
  end

  // host: answer memory reads (the second read first gets a wrong tag)
  initial begin
    forever begin
      logic [31:0] a, dws [$];
      logic [7:0]  tg;
      int nb;
      @(posedge clk);
      if (pend_addr.size() > 0) begin
        a  = pend_addr.pop_front();
        tg = pend_tag.pop_front();
        dws.delete();
        dws.push_back(32'h4a000000 | LEN);
        dws.push_back({16'h0000, 3'b000, 1'b0, 12'(LEN * 4)});
        if (rd_done == 1 && bad_sent == 0) begin
          dws.push_back({16'h0300, tg ^ 8'h05, 1'b0, a[6:0]});
          bad_sent = 1;
        end else begin
          dws.push_back({16'h0300, tg, 1'b0, a[6:0]});
          rd_seen++;
        end
        for (int i = 0; i < LEN; i++) dws.push_back(host_dw(a + 4 * i));
        nb = (dws.size() + 15) / 16;
        for (int b = 0; b < nb; b++) begin
          #10;
          while ($urandom_range(0, 2) == 0) @(posedge clk);
          #5;
          rc_tdata = '0;
          for (int i = 0; i < 16; i++) if (16*b + i < dws.size()) rc_tdata[32*i +: 32] = dws[16*b + i];
          rc_tvalid = 1; rc_tlast = (b == nb - 1);
          do @(posedge clk); while (!rc_tready);
          #5 rc_tvalid = 0;
        end
      end
    end
  end

  // fromHost FIFO model
  always @(posedge clk) begin
    if (fh_tvalid && fh_tready) begin
      logic [31:0] base;
      base = 32'h3000 + fh_words * 64;
      for (int i = 0; i < 16; i++) chk(fh_tdata[32*i +: 32], host_dw(base + 4 * i), "FromHost word");
      fh_words++;
    end
    #10 fh_tready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    desc_addr[0] = 64'h1000_0000;  desc_len_dw[0] = LEN;
    desc_addr[1] = 64'h3000;       desc_len_dw[1] = LEN;
    for (int i = 0; i < WR_TLPS * LEN / 16; i++) begin
      logic [511:0] w;
      for (int j = 0; j < 16; j++) w[32*j +: 32] = $urandom;
      th_words.push_back(w);
      th_expect.push_back(w);
    end
    repeat (3) @(posedge clk);
    #10 rst_n = 1;
    desc_active = 2'b11;
    wait (wr_done == WR_TLPS && rd_done == RD_TLPS);
    repeat (20) @(posedge clk);
    chk(wr_seen, WR_TLPS, "write TLPs seen");
    chk(rd_seen, RD_TLPS, "good completions");
    chk(fh_words, RD_TLPS * LEN / 16, "FromHost words");
    chk(bad_sent, 1, "bad completion sent");
    chk(reissued, 1, "read issued again");
    chk(th_expect.size(), 0, "all toHost words sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
