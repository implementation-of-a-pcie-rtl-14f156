// Testbench for fft_parallel at both sizes used in the design: 16 points
// with 13 cycles of latency and 32 points with 19. A new frame enters on
// every cycle; each output frame is compared, LAT cycles after its input,
// with a floating-point DFT divided by N (tolerance a few LSBs). Frames:
// the sine of the functional test (k = 2, amplitude 0.1 of full scale,
// expected peaks only in bins 2 and N-2), unit impulses on every input
// ("deltas"), a constant (energy only in bin 0) and random complex data.
module tb_fft_parallel;
  localparam int N1 = 16, L1 = 13, N2 = 32, L2 = 19;
  localparam real PI = 3.14159265358979323846;
  localparam int NFR = 400;

  logic clk = 0;
  always #50 clk = ~clk;

  logic signed [15:0] a_re [N1], a_im [N1], ya_re [N1], ya_im [N1];
  logic signed [15:0] b_re [N2], b_im [N2], yb_re [N2], yb_im [N2];

  fft_parallel dut16 (.clk(clk), .x_re(a_re), .x_im(a_im), .y_re(ya_re), .y_im(ya_im));
  fft_parallel #(.N(N2), .LAT(L2)) dut32 (.clk(clk), .x_re(b_re), .x_im(b_im), .y_re(yb_re), .y_im(yb_im));

  int checks = 0, failures = 0;
  int tol1 = 6, tol2 = 7;

  // stimulus store: frame f, sample n
  int in_re [2][NFR][32];
  int in_im [2][NFR][32];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_frame(int s, int f, int n);
    for (int i = 0; i < n; i++) begin
      in_re[s][f][i] = 0; in_im[s][f][i] = 0;
    end
    if (f == 0) begin                       // sine, k = 2, A = 0.1
      for (int i = 0; i < n; i++)
        in_re[s][f][i] = $rtoi($floor(0.1 * $sin(2.0 * PI * 2 * i / n) * 32768.0 + 0.5));
    end else if (f <= n) begin              // delta on input f-1
      in_re[s][f][f-1] = 16384;
    end else if (f == n + 1) begin          // constant
      for (int i = 0; i < n; i++) in_re[s][f][i] = 8000;
    end else begin                          // random, half scale
      for (int i = 0; i < n; i++) begin
        in_re[s][f][i] = $urandom_range(0, 32766) - 16383;
        in_im[s][f][i] = $urandom_range(0, 32766) - 16383;
      end
    end
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic compare(int s, int f, int n, int tol);
    real er, ei;
    int   gr, gi;
    for (int k = 0; k < n; k++) begin
      er = 0.0; ei = 0.0;
      for (int i = 0; i < n; i++) begin
        er += in_re[s][f][i] * $cos(2.0*PI*k*i/n) + in_im[s][f][i] * $sin(2.0*PI*k*i/n);
        ei += in_im[s][f][i] * $cos(2.0*PI*k*i/n) - in_re[s][f][i] * $sin(2.0*PI*k*i/n);
      end
      er /= n; ei /= n;
      gr = (s == 0) ? int'(ya_re[k]) : int'(yb_re[k]);
      gi = (s == 0) ? int'(ya_im[k]) : int'(yb_im[k]);
      checks++;
      if (rabs(gr - er) > tol || rabs(gi - ei) > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL N=%0d frame %0d bin %0d: got (%0d,%0d) expected (%f,%f)", n, f, k, gr, gi, er, ei);
      end
    end
    if (f == 0) begin                       // sine: only bins 2 and N-2 carry energy
      for (int k = 0; k < n; k++) begin
        gi = (s == 0) ? int'(ya_im[k]) : int'(yb_im[k]);
        gr = (s == 0) ? int'(ya_re[k]) : int'(yb_re[k]);
        checks++;
        if ((k == 2 || k == n - 2) ? (rabs(gi) < 1600 || rabs(gi) > 1680)
                                   : (rabs(gi) > 4 || rabs(gr) > 4)) begin
          failures++;
          $display("FAIL N=%0d sine bin %0d = (%0d,%0d)", n, k, gr, gi);
        end
      end
    end
  endtask

  initial begin
    for (int f = 0; f < NFR; f++) begin
      make_frame(0, f, N1);
      make_frame(1, f, N2);
    end
    for (int cyc = 0; cyc < NFR + L2 + 2; cyc++) begin
      @(negedge clk);
      if (cyc >= L1 && cyc - L1 < NFR) compare(0, cyc - L1, N1, tol1);
      if (cyc >= L2 && cyc - L2 < NFR) compare(1, cyc - L2, N2, tol2);
      for (int i = 0; i < N1; i++) begin
        a_re[i] = (cyc < NFR) ? 16'(in_re[0][cyc][i]) : '0;
        a_im[i] = (cyc < NFR) ? 16'(in_im[0][cyc][i]) : '0;
      end
      for (int i = 0; i < N2; i++) begin
        b_re[i] = (cyc < NFR) ? 16'(in_re[1][cyc][i]) : '0;
        b_im[i] = (cyc < NFR) ? 16'(in_im[1][cyc][i]) : '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
