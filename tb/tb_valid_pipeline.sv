// Testbench for valid_pipeline: a single pulse must come out exactly LAT
// cycles later (13 and 19, the two FFT latencies), and a random valid
// stream must come out unchanged and delayed by LAT; reset clears it.
module tb_valid_pipeline;
  logic clk = 0, rst_n = 0;
  logic vin = 0;
  logic vout13, vout19;
  int   checks = 0, failures = 0;
  bit   hist [$];

  always #50 clk = ~clk;

  valid_pipeline dut13 (.clk(clk), .rst_n(rst_n), .valid_in(vin), .valid_out(vout13));
  valid_pipeline #(.LAT(19)) dut19 (.clk(clk), .rst_n(rst_n), .valid_in(vin), .valid_out(vout19));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int first13, first19;
    repeat (3) @(posedge clk);
    #10 rst_n = 1;
    // one pulse: count cycles from the edge that samples it
    // cycle 0 presents the pulse; valid_out must be high in cycle LAT
    @(negedge clk) vin = 1;
    first13 = -1; first19 = -1;
    for (int c = 1; c <= 30; c++) begin
      @(posedge clk); #10;
      vin = 0;
      if (vout13 && first13 < 0) first13 = c;
      if (vout19 && first19 < 0) first19 = c;
    end
    checks++; if (first13 != 13) begin failures++; $display("FAIL latency 13: %0d", first13); end
    checks++; if (first19 != 19) begin failures++; $display("FAIL latency 19: %0d", first19); end
    // random stream, compared with a delay-line model
    hist.delete();
    for (int i = 0; i < 40; i++) hist.push_back(0);
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      chk(vout13, hist[hist.size()-13], "stream LAT=13");
      chk(vout19, hist[hist.size()-19], "stream LAT=19");
      vin = 1'($urandom_range(0, 1));
      hist.push_back(vin);
      hist.pop_front();
    end
    // reset clears the pipeline
    vin = 1;
    @(negedge clk); @(negedge clk);
    rst_n = 0; #10;
    chk(vout13, 0, "reset 13");
    chk(vout19, 0, "reset 19");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
