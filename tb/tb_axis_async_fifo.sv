// Testbench for axis_async_fifo (512 bits x 512 words, prog_full at 480)
// with unrelated write and read clocks. Checks: a stream of 3000 words
// with random valid and ready on both sides comes out complete and in
// order; with the reader stopped the FIFO takes exactly DEPTH words, then
// drops s_tready and raises full; prog_full rises exactly when the fill
// count reaches PROG_FULL; after draining, empty is set and m_tvalid low.
module tb_axis_async_fifo;
  localparam int DW = 512, DEPTH = 512, PF = 480;
  logic s_aclk = 0, m_aclk = 0, s_aresetn = 0;
  logic [DW-1:0] s_tdata = '0, m_tdata;
  logic s_tvalid = 0, s_tready, prog_full, full, m_tvalid, m_tready = 0, empty;

  always #20 s_aclk = ~s_aclk;
  always #35 m_aclk = ~m_aclk;

  axis_async_fifo dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  localparam int NW = 3000;
  bit stop_reader = 0;

  function automatic logic [DW-1:0] word(int n);
    return {16{32'(n) ^ 32'h9e3779b9 * 32'(n)}};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  initial begin
    forever begin
      @(posedge m_aclk);
      if (m_tvalid && m_tready) begin
        checks++;
        if (m_tdata !== word(got)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d", got);
        end
        got++;
      end
      #5 m_tready = !stop_reader && ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    int acc;
    #200 s_aresetn = 1;
    // phase 1: random stream
    while (sent < NW) begin
      @(negedge s_aclk);
      s_tvalid = ($urandom_range(0, 2) != 0);
      s_tdata  = word(sent);
      @(posedge s_aclk);
      if (s_tvalid && s_tready) sent++;
    end
    @(negedge s_aclk) s_tvalid = 0;
    wait (got == NW);
    checks++;
    // phase 2: fill with the reader stopped
    stop_reader = 1;
    repeat (10) @(posedge m_aclk);
    acc = 0;
    for (int c = 0; c < DEPTH + 40; c++) begin
      @(negedge s_aclk);
      checks++;
      if (prog_full !== (acc >= PF)) begin
        failures++;
        $display("FAIL prog_full=%0b with %0d words", prog_full, acc);
      end
      s_tvalid = 1;
      s_tdata  = word(sent);
      @(posedge s_aclk);
      if (s_tready) begin sent++; acc++; end
    end
    @(negedge s_aclk) s_tvalid = 0;
    checks++;
    if (acc != DEPTH || !full || s_tready) begin
      failures++;
      $display("FAIL fill: took %0d words, full=%0b s_tready=%0b", acc, full, s_tready);
    end
    // drain
    stop_reader = 0;
    wait (got == sent);
    repeat (10) @(posedge m_aclk);
    checks++;
    if (!empty || m_tvalid || full || prog_full) begin
      failures++;
      $display("FAIL after drain: empty=%0b m_tvalid=%0b full=%0b", empty, m_tvalid, full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
