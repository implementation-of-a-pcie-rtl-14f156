// Testbench for wupper_core with a host model on its TLP streams. The host
// programs both descriptors through register writes (ToHost at a 64-bit
// address, FromHost below 4 GiB, 64-DW TLPs), starts them, and polls the
// done register. Checks: the toHost FIFO words land in host memory at the
// descriptor's addresses in order; host memory reaches the fromHost FIFO
// in order; the done bits and the pointers read back as expected; the
// register map control word reaches its output.
module tb_wupper_core;
  logic clk = 0, rst_n = 0;
  logic [15:0] bdf_id = 16'h0100;
  logic [511:0] cq_tdata, cc_tdata, rq_tdata, rc_tdata, th_tdata = '0, fh_tdata;
  logic cq_tvalid, cq_tlast, cq_tready, cc_tvalid, cc_tlast, cc_tready;
  logic rq_tvalid, rq_tlast, rq_tready, rc_tvalid, rc_tlast, rc_tready;
  logic th_tvalid = 0, th_tready, fh_tvalid, fh_tready = 0, fh_almost_full = 0;
  logic [31:0] register_map_control, register_map_monitor = 32'h1234_5678;

  always #20 clk = ~clk;

  wupper_core dut (.*);
  pcie_host_model host (.*);

  int checks = 0, failures = 0;
  localparam int WORDS = 16;                   // 1024 bytes each way
  localparam longint TH_BASE = 64'h4_0000_0000, FH_BASE = 64'h0008_0000;
  logic [511:0] th_q [$];
  logic [511:0] th_all [WORDS];
  int fh_n = 0;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // toHost FIFO model
  always @(posedge clk) begin
    logic taken;
    taken = th_tvalid && th_tready;
    if (taken) void'(th_q.pop_front());
    #10;
    if (taken) th_tvalid = 0;
    if (!th_tvalid) th_tvalid = (th_q.size() > 0) && ($urandom_range(0, 3) != 0);
    th_tdata = (th_q.size() > 0) ? th_q[0] : '0;
  end

  // fromHost FIFO model
  always @(posedge clk) begin
    if (fh_tvalid && fh_tready) begin
      for (int i = 0; i < 16; i++)
        chk(fh_tdata[32*i +: 32], host.rd_dw((FH_BASE >> 2) + 16 * fh_n + i), "FromHost data");
      fh_n++;
    end
    #10 fh_tready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    logic [31:0] d;
    for (int w = 0; w < WORDS; w++) begin
      for (int j = 0; j < 16; j++) th_all[w][32*j +: 32] = $urandom;
      th_q.push_back(th_all[w]);
    end
    repeat (3) @(posedge clk);
    #10 rst_n = 1;
    host.reg_write(32'h000, 32'(TH_BASE));        host.reg_write(32'h004, 32'(TH_BASE >> 32));
    host.reg_write(32'h008, 32'(TH_BASE + 1024)); host.reg_write(32'h00C, 32'(TH_BASE >> 32));
    host.reg_write(32'h010, 32'd64);
    host.reg_write(32'h020, 32'(FH_BASE));        host.reg_write(32'h024, 0);
    host.reg_write(32'h028, 32'(FH_BASE + 1024)); host.reg_write(32'h02C, 0);
    host.reg_write(32'h030, 32'd64);
    host.reg_write(32'h040, 32'hA5A5_0001);
    host.reg_read(32'h044, d); chk(d, 32'h1234_5678, "monitor register");
    chk(register_map_control, 32'hA5A5_0001, "control register");
    host.reg_write(32'h100, 32'h3);
    do begin
      repeat (20) @(posedge clk);
      host.reg_read(32'h104, d);
    end while (d != 32'h3);
    chk(d, 3, "both descriptors done");
    host.reg_read(32'h110, d); chk(d, 32'(TH_BASE + 1024), "ToHost pointer");
    host.reg_read(32'h118, d); chk(d, 32'(FH_BASE + 1024), "FromHost pointer");
    for (int w = 0; w < WORDS; w++)
      for (int j = 0; j < 16; j++)
        chk(host.rd_dw((TH_BASE >> 2) + 16 * w + j), th_all[w][32*j +: 32], "ToHost data in host memory");
    chk(fh_n, WORDS, "FromHost words");
    chk(host.n_mwr, 4, "write TLPs");
    chk(host.n_hdr4, 4, "4-DW headers for the 64-bit address");
    chk(host.n_bad, 0, "register completions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
