// Testbench for fpfft32_top: frames are sent as 32 real parts in the low
// half and 32 imaginary parts in the high half of the bus, with valid_in
// high on some cycles only. Checks: ready_in is always 1; valid_out is
// valid_in delayed by exactly 19 cycles; each output frame marked valid
// matches a floating-point DFT/32 of its input (within 7 LSBs) in the
// same bus layout; the k = 2 sine of the functional test gives its peaks
// in bins 2 and 32-2; reset clears valid_out.
module tb_fpfft32_top;
  localparam int N = 32, LAT = 19, NFR = 300, TOL = 7;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 0;
  logic valid_in = 0, ready_in, valid_out, ready_out = 1;
  logic [32*N-1:0] In_FFT = '0, Out_FFT;
  always #20 clk = ~clk;

  fpfft32_top dut (.*);

  int checks = 0, failures = 0;
  int fr_re [NFR][N], fr_im [NFR][N];
  bit vhist [NFR + LAT + 4];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic compare(int f);
    real er, ei;
    int gr, gi;
    for (int k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int i = 0; i < N; i++) begin
        er += fr_re[f][i] * $cos(2.0*PI*k*i/N) + fr_im[f][i] * $sin(2.0*PI*k*i/N);
        ei += fr_im[f][i] * $cos(2.0*PI*k*i/N) - fr_re[f][i] * $sin(2.0*PI*k*i/N);
      end
      er /= N; ei /= N;
      gr = int'($signed(Out_FFT[16*k +: 16]));
      gi = int'($signed(Out_FFT[16*N + 16*k +: 16]));
      checks++;
      if (rabs(gr - er) > TOL || rabs(gi - ei) > TOL) begin
        failures++;
        if (failures < 20) $display("FAIL frame %0d bin %0d: (%0d,%0d) vs (%f,%f)", f, k, gr, gi, er, ei);
      end
      if (f == 0) begin
        checks++;
        if ((k == 2 || k == N-2) ? (gi > -1600 && gi < 1600) : (gi > 4 || gi < -4)) begin
          failures++;
          $display("FAIL sine bin %0d im %0d", k, gi);
        end
      end
    end
  endtask

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int i = 0; i < N; i++) begin
        if (f == 0) begin
          fr_re[f][i] = $rtoi($floor(0.1 * $sin(2.0*PI*2*i/N) * 32768.0 + 0.5));
          fr_im[f][i] = 0;
        end else begin
          fr_re[f][i] = $urandom_range(0, 32766) - 16383;
          fr_im[f][i] = $urandom_range(0, 32766) - 16383;
        end
      end
    repeat (3) @(negedge clk);
    rst = 1;
    for (int c = 0; c < NFR + LAT + 2; c++) begin
      @(negedge clk);
      checks++;
      if (ready_in !== 1'b1) begin failures++; $display("FAIL ready_in low"); end
      // output of cycle c belongs to the input of cycle c-LAT
      if (c >= LAT) begin
        checks++;
        if (valid_out !== vhist[c-LAT]) begin
          failures++;
          $display("FAIL valid_out %0b at cycle %0d, expected %0b", valid_out, c, vhist[c-LAT]);
        end
        if (valid_out && c - LAT < NFR) compare(c - LAT);
      end
      vhist[c] = (c < NFR) && (c == 0 || $urandom_range(0, 3) != 0);
      valid_in = vhist[c];
      for (int i = 0; i < N; i++) begin
        In_FFT[16*i +: 16]     = (c < NFR) ? 16'(fr_re[c][i]) : '0;
        In_FFT[16*N+16*i +: 16] = (c < NFR) ? 16'(fr_im[c][i]) : '0;
      end
      ready_out = 1'($urandom_range(0, 1));
    end
    valid_in = 1;
    repeat (LAT + 1) @(negedge clk);
    rst = 0;
    #10 checks++;
    if (valid_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
