// Behavioural model of the host side of one PCIe endpoint, for testbenches.
//
// Plays the root complex and host memory against the endpoint's four TLP
// streams (same format as the DMA core: one TLP per packet, DW0 in bits
// 31:0, payload packed right after the header):
//  * reg_write / reg_read send 1-DW memory write / read requests on cq
//    (3-DW headers, requester ID 0x0000) and wait for the completion on cc;
//  * memory-write TLPs arriving on rq are stored in host memory, memory
//    reads are answered on rc with one completion each (3-DW header, data
//    from host memory), after a random delay;
//  * rq_tready and the rc beats stall at random when STALL is set.
// Host memory is an associative array of DWs indexed by byte address / 4;
// a DW never written reads as the function init_dw of its address.
// Counters report what was seen: write and read TLPs, 3- and 4-DW headers.
module pcie_host_model #(
  parameter int unsigned BUS_W = 512,
  parameter bit          STALL = 1
) (
  input  logic             clk,
  output logic [BUS_W-1:0] cq_tdata,
  output logic             cq_tvalid,
  output logic             cq_tlast,
  input  logic             cq_tready,
  input  logic [BUS_W-1:0] cc_tdata,
  input  logic             cc_tvalid,
  input  logic             cc_tlast,
  output logic             cc_tready,
  input  logic [BUS_W-1:0] rq_tdata,
  input  logic             rq_tvalid,
  input  logic             rq_tlast,
  output logic             rq_tready,
  output logic [BUS_W-1:0] rc_tdata,
  output logic             rc_tvalid,
  output logic             rc_tlast,
  input  logic             rc_tready
);
  localparam int DWB = BUS_W / 32;

  logic [31:0] mem [longint];
  int n_mwr = 0, n_mrd = 0, n_hdr3 = 0, n_hdr4 = 0, n_cpl_sent = 0, n_bad = 0;

  initial begin
    cq_tdata = '0; cq_tvalid = 0; cq_tlast = 0; cc_tready = 1;
    rq_tready = 0; rc_tdata = '0; rc_tvalid = 0; rc_tlast = 0;
  end

  function automatic logic [31:0] init_dw(longint dw_addr);
    return 32'(dw_addr * 32'h2545F491) ^ 32'h5a5a0000;
  endfunction

  function automatic logic [31:0] rd_dw(longint dw_addr);
    return mem.exists(dw_addr) ? mem[dw_addr] : init_dw(dw_addr);
  endfunction

  // ---------------- register access ----------------
  task automatic send_cq(logic [31:0] dws [$]);
    @(negedge clk);
    cq_tdata = '0;
    foreach (dws[i]) cq_tdata[32*i +: 32] = dws[i];
    cq_tvalid = 1; cq_tlast = 1;
    do @(posedge clk); while (!cq_tready);
    #1 cq_tvalid = 0;
  endtask

  task automatic reg_write(logic [31:0] addr, logic [31:0] data);
    send_cq('{32'h40000001, 32'h0000000f, addr, data});
  endtask

  task automatic reg_read(logic [31:0] addr, output logic [31:0] data);
    send_cq('{32'h00000001, 32'h0000010f, addr});
    while (!(cc_tvalid && cc_tready)) @(posedge clk);
    if (cc_tdata[31:24] != 8'h4a || cc_tdata[79:72] != 8'h01) n_bad++;
    data = cc_tdata[127:96];
    @(posedge clk);
  endtask

  // ---------------- requests from the endpoint ----------------
  logic [31:0] tlp [$];
  longint      rd_addr [$];
  int          rd_len [$];
  logic [15:0] rd_rid [$];
  logic [7:0]  rd_tag [$];

  always @(posedge clk) begin
    if (rq_tvalid && rq_tready) begin
      for (int i = 0; i < DWB; i++) tlp.push_back(rq_tdata[32*i +: 32]);
      if (rq_tlast) begin
        int h, len;
        longint a;
        h   = tlp[0][29] ? 4 : 3;
        len = (tlp[0][9:0] == 0) ? 1024 : int'(tlp[0][9:0]);
        a   = (h == 4) ? {tlp[2], tlp[3][31:2], 2'b00} : longint'({tlp[2][31:2], 2'b00});
        if (h == 4) n_hdr4++; else n_hdr3++;
        if (tlp[0][30]) begin                       // memory write
          for (int i = 0; i < len; i++) mem[(a >> 2) + i] = tlp[h + i];
          n_mwr++;
        end else begin                              // memory read
          rd_addr.push_back(a); rd_len.push_back(len);
          rd_rid.push_back(tlp[1][31:16]); rd_tag.push_back(tlp[1][15:8]);
          n_mrd++;
        end
        tlp.delete();
      end
    end
    #2 rq_tready = !STALL || ($urandom_range(0, 3) != 0);
  end

  initial begin
    forever begin
      logic [31:0] dws [$];
      longint a;
      int len, nb;
      @(posedge clk);
      if (rd_addr.size() > 0) begin
        a = rd_addr.pop_front(); len = rd_len.pop_front();
        dws.delete();
        dws.push_back(32'h4a000000 | 32'(len & 10'h3ff));
        dws.push_back({16'h0000, 3'b000, 1'b0, 12'(len * 4)});
        dws.push_back({rd_rid.pop_front(), rd_tag.pop_front(), 1'b0, 7'(a)});
        for (int i = 0; i < len; i++) dws.push_back(rd_dw((a >> 2) + i));
        nb = (dws.size() + DWB - 1) / DWB;
        repeat ($urandom_range(2, 10)) @(posedge clk);
        for (int b = 0; b < nb; b++) begin
          while (STALL && $urandom_range(0, 3) == 0) @(posedge clk);
          #3;
          rc_tdata = '0;
          for (int i = 0; i < DWB; i++) if (DWB*b + i < dws.size()) rc_tdata[32*i +: 32] = dws[DWB*b + i];
          rc_tvalid = 1; rc_tlast = (b == nb - 1);
          do @(posedge clk); while (!rc_tready);
          #1 rc_tvalid = 0;
        end
        n_cpl_sent++;
      end
    end
  end
endmodule
