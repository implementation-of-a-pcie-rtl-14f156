// Testbench for dma_control. The host side is played by sending request
// TLPs on cq and checking the completions on cc, starting with the worked
// example of a PCIe memory write and read: the write 0x40000001 0x0000000f
// 0xfdaff040 0xf0e1f2c3 and the read 0x00000001 0x00000c0f 0xfdaff040 must
// give, from completer 0x0100, the completion 0x4a000001 0x01000004
// 0x00000c40 0xf0e1f2c3. Then: 64-bit (4-DW) writes, the monitor register,
// a two-DW read (unsupported-request completion), a completion held while
// cc is not ready, and both descriptors: pointer advance per finished TLP,
// end of a one-shot descriptor (done bit, enable cleared) and circular
// wrap-around with its wrap count.
module tb_dma_control;
  import pcie_fft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] completer_id = 16'h0100;
  logic [511:0] cq_tdata = '0, cc_tdata;
  logic cq_tvalid = 0, cq_tlast = 0, cq_tready, cc_tvalid, cc_tlast, cc_tready = 1;
  logic [63:0] desc_addr [2];
  logic [10:0] desc_len_dw [2];
  logic [1:0]  desc_active, tlp_done = '0;
  logic [31:0] register_map_control, register_map_monitor = 32'h5eed_cafe;

  always #20 clk = ~clk;

  dma_control dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic send(logic [31:0] dws [$]);
    @(negedge clk);
    cq_tdata = '0;
    foreach (dws[i]) cq_tdata[32*i +: 32] = dws[i];
    cq_tvalid = 1; cq_tlast = 1;
    do @(posedge clk); while (!cq_tready);
    #10 cq_tvalid = 0;
  endtask

  task automatic get_cpl(output logic [127:0] c);
    while (!cc_tvalid) @(posedge clk);
    c = cc_tdata[127:0];
    chk(cc_tlast, 1, "cc_tlast");
    @(posedge clk); #10;
  endtask

  task automatic wr32(logic [31:0] a, logic [31:0] d);
    send('{32'h40000001, 32'h0000000f, a, d});
  endtask

  task automatic rd32(logic [31:0] a, output logic [31:0] d);
    logic [127:0] c;
    send('{32'h00000001, 32'h00001a0f, a});
    get_cpl(c);
    chk(c[31:0], 32'h4a000001, "cpl dw0");
    chk(c[95:64], {16'h0000, 8'h1a, 1'b0, a[6:0]}, "cpl dw2");
    d = c[127:96];
  endtask

  initial begin
    logic [127:0] c;
    logic [31:0] d;
    logic [63:0] a;
    repeat (3) @(posedge clk);
    #10 rst_n = 1;
    // the worked example
    send('{32'h40000001, 32'h0000000f, 32'hfdaff040, 32'hf0e1f2c3});
    @(posedge clk); #10 chk(register_map_control, 32'hf0e1f2c3, "write example");
    send('{32'h00000001, 32'h00000c0f, 32'hfdaff040});
    get_cpl(c);
    chk(c[31:0],   32'h4a000001, "completion DW0");
    chk(c[63:32],  32'h01000004, "completion DW1");
    chk(c[95:64],  32'h00000c40, "completion DW2");
    chk(c[127:96], 32'hf0e1f2c3, "completion DW3");
    // read with cc back-pressure: completion must be held
    cc_tready = 0;
    send('{32'h00000001, 32'h00000301, 32'hfdaff044});
    repeat (5) @(posedge clk);
    #10 chk(cc_tvalid, 1, "completion held");
    chk(cc_tdata[127:96], 32'h5eedcafe, "monitor register");
    chk(cc_tdata[63:32], 32'h01000001, "byte count of BE 0x1");
    cc_tready = 1;
    @(posedge clk); #10;
    // partial byte enables do not write
    send('{32'h40000001, 32'h00000003, 32'hfdaff040, 32'h12345678});
    rd32(32'hfdaff040, d);
    chk(d, 32'hf0e1f2c3, "partial write ignored");
    // 4-DW write to a 64-bit address
    send('{32'h60000001, 32'h0000000f, 32'h00000001, 32'hfdaff040, 32'h0badf00d});
    rd32(32'hfdaff040, d);
    chk(d, 32'h0badf00d, "4DW write");
    // two-DW read: unsupported request, no data
    send('{32'h00000002, 32'h0000070f, 32'hfdaff040});
    get_cpl(c);
    chk(c[31:0], 32'h0a000000, "UR completion DW0");
    chk(c[47:45], 3'b001, "UR status");

    // descriptor 0: one-shot, 4 TLPs of 64 DW from 0x1000
    wr32(32'h000, 32'h0000_1000); wr32(32'h004, 0);
    wr32(32'h008, 32'h0000_1400); wr32(32'h00C, 0);
    wr32(32'h010, 32'd64);
    // descriptor 1: circular, 2 TLPs of 32 DW at a 64-bit address
    wr32(32'h020, 32'h0000_2000); wr32(32'h024, 32'h1);
    wr32(32'h028, 32'h0000_2100); wr32(32'h02C, 32'h1);
    wr32(32'h030, 32'h1000 | 32'd32);
    wr32(32'h100, 32'h3);
    @(posedge clk); #10;
    chk(desc_active, 2'b11, "both active");
    chk(desc_addr[0], 64'h1000, "desc0 start");
    chk(desc_addr[1], 64'h1_0000_2000, "desc1 start");
    chk(desc_len_dw[0], 64, "desc0 length");
    chk(desc_len_dw[1], 32, "desc1 length");
    for (int t = 1; t <= 5; t++) begin
      @(negedge clk) tlp_done = 2'b11;
      @(negedge clk) tlp_done = 2'b00;
      if (t < 4) chk(desc_addr[0], 64'h1000 + 256 * t, "desc0 pointer");
      if (t == 4) begin
        chk(desc_active[0], 0, "desc0 finished");
      end
      a = (t % 2 == 1) ? 64'h1_0000_2080 : 64'h1_0000_2000;
      chk(desc_addr[1], a, "desc1 circular pointer");
      chk(desc_active[1], 1, "desc1 stays active");
    end
    rd32(32'h104, d);  chk(d, 32'h1, "done bits");
    rd32(32'h100, d);  chk(d, 32'h2, "enable bits");
    rd32(32'h118, d);  chk(d, 32'h2080, "desc1 pointer low");
    rd32(32'h11C, d);  chk(d, 32'h1, "desc1 pointer high");
    rd32(32'h124, d);  chk(d, 32'd2, "desc1 wrap count");
    rd32(32'h010, d);  chk(d, 32'd64, "desc0 length readback");
    wr32(32'h100, 32'h0);
    @(posedge clk); #10 chk(desc_active, 2'b00, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
