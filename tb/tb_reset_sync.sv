// Testbench for reset_sync: the output must follow an asserting input at
// once (no clock needed) and be released exactly STAGES (3) rising edges
// after the input is released.
module tb_reset_sync;
  logic clk = 0, arst_n = 0, rst_n;
  int   checks = 0, failures = 0;

  always #50 clk = ~clk;

  reset_sync dut (.clk(clk), .arst_n(arst_n), .rst_n(rst_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b", what, got, exp); end
  endtask

  initial begin
    int n;
    repeat (4) @(posedge clk);
    chk(rst_n, 0, "held in reset");
    for (int trial = 0; trial < 5; trial++) begin
      @(negedge clk) arst_n = 1;
      n = 0;
      while (rst_n !== 1 && n < 10) begin @(posedge clk); #10; n++; end
      checks++;
      if (n != 3) begin failures++; $display("FAIL release after %0d edges", n); end
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #20 arst_n = 0;     // between edges
      #10 chk(rst_n, 0, "asynchronous assertion");
      repeat (2) @(posedge clk);
      #10 chk(rst_n, 0, "stays asserted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
