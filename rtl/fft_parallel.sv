// N-point, N-parallel pipelined FFT (fixed point).
//
// All N complex samples of a frame enter on the same clock edge and all N
// frequency bins leave together LAT cycles later; a new frame can enter on
// every cycle. The transform is radix-2 decimation in frequency with
// log2(N) butterfly stages, each followed by a register. Every butterfly
// halves its results, a' = (a+b)/2 and b' = (a-b)*W/2, so the output is the
// DFT divided by N and never overflows for in-range inputs. Twiddle factors
// W = exp(-j*2*pi*k/N) are Q1.15 constants computed at elaboration from
// cos/sin and rounded to the nearest integer; a twiddle of 1 is applied as
// a plain shift. Products are truncated (arithmetic shift) and saturated to
// 16 bits. After the last stage the bins are put back in natural order and
// pass through LAT - log2(N) further registers, so the total latency is LAT.
//
// Ports: x_re/x_im[i] is time sample i, y_re/y_im[k] is bin k, all signed
// W bits. There is no enable and no reset on the data path: the pipeline
// free-runs and the surrounding wrapper marks which outputs are valid.
//
// The FFT size, the 16-bit samples, full parallelism and the latency
// (13 cycles for 16 points, 19 for 32) are those of the FFTs this test
// bench was built to carry; the radix-2 structure, the 1/N scaling and the
// rounding are this design's own choices.
module fft_parallel #(
  parameter int unsigned N   = 16,
  parameter int unsigned W   = 16,
  parameter int unsigned LAT = 13
) (
  input  logic                clk,
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic signed [W-1:0] y_re [N],
  output logic signed [W-1:0] y_im [N]
);

  localparam int unsigned S     = $clog2(N);
  localparam int unsigned EXTRA = LAT - S;
  localparam real         PI    = 3.14159265358979323846;

  // Q1.15 twiddle, rounded to nearest, with +1.0 clipped to the largest code
  function automatic logic signed [W-1:0] tw_q(input real v);
    real    r;
    r = v * real'((longint'(1) << (W-1)) - 1);
    return W'($rtoi($floor(r + 0.5)));
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [2*W+1:0] v);
    localparam logic signed [2*W+1:0] MAXV = (2*W+2)'((longint'(1) << (W-1)) - 1);
    localparam logic signed [2*W+1:0] MINV = -MAXV - 1;
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  function automatic int unsigned bitrev(input int unsigned v);
    int unsigned r;
    r = 0;
    for (int b = 0; b < S; b++) r |= ((v >> b) & 1) << (S - 1 - b);
    return r;
  endfunction

  // stage registers: st_re[s] is the output of stage s
  logic signed [W-1:0] st_re [S][N];
  logic signed [W-1:0] st_im [S][N];

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned HALF = N >> (s + 1);
    logic signed [W-1:0] a_re [N];
    logic signed [W-1:0] a_im [N];
    logic signed [W-1:0] n_re [N];
    logic signed [W-1:0] n_im [N];

    if (s == 0) begin : g_in
      assign a_re = x_re;
      assign a_im = x_im;
    end else begin : g_prev
      assign a_re = st_re[s-1];
      assign a_im = st_im[s-1];
    end

    for (genvar i = 0; i < N; i++) begin : g_bf
      if ((i & HALF) == 0) begin : g_pair
        localparam int unsigned K = (i % HALF) << s;  // twiddle exponent
        localparam logic signed [W-1:0] WR = tw_q($cos(2.0 * PI * K / N));
        localparam logic signed [W-1:0] WI = tw_q(-$sin(2.0 * PI * K / N));
        logic signed [W:0]     sum_re, sum_im, dif_re, dif_im;
        logic signed [2*W+1:0] p_re, p_im;

        always_comb begin
          sum_re = {a_re[i][W-1], a_re[i]} + {a_re[i+HALF][W-1], a_re[i+HALF]};
          sum_im = {a_im[i][W-1], a_im[i]} + {a_im[i+HALF][W-1], a_im[i+HALF]};
          dif_re = {a_re[i][W-1], a_re[i]} - {a_re[i+HALF][W-1], a_re[i+HALF]};
          dif_im = {a_im[i][W-1], a_im[i]} - {a_im[i+HALF][W-1], a_im[i+HALF]};
          if (K == 0) begin
            p_re = (2*W+2)'(dif_re) <<< (W - 1);
            p_im = (2*W+2)'(dif_im) <<< (W - 1);
          end else begin
            p_re = (2*W+2)'(dif_re * WR) - (2*W+2)'(dif_im * WI);
            p_im = (2*W+2)'(dif_re * WI) + (2*W+2)'(dif_im * WR);
          end
          n_re[i]      = W'(sum_re >>> 1);
          n_im[i]      = W'(sum_im >>> 1);
          n_re[i+HALF] = sat(p_re >>> W);
          n_im[i+HALF] = sat(p_im >>> W);
        end
      end
    end

    always_ff @(posedge clk) begin
      st_re[s] <= n_re;
      st_im[s] <= n_im;
    end
  end

  // natural order, then the padding registers up to LAT
  logic signed [W-1:0] dl_re [EXTRA+1][N];
  logic signed [W-1:0] dl_im [EXTRA+1][N];

  for (genvar k = 0; k < N; k++) begin : g_reorder
    assign dl_re[0][k] = st_re[S-1][bitrev(k)];
    assign dl_im[0][k] = st_im[S-1][bitrev(k)];
  end

  for (genvar d = 0; d < EXTRA; d++) begin : g_delay
    always_ff @(posedge clk) begin
      dl_re[d+1] <= dl_re[d];
      dl_im[d+1] <= dl_im[d];
    end
  end

  assign y_re = dl_re[EXTRA];
  assign y_im = dl_im[EXTRA];

  initial begin
    assert (N >= 2 && (1 << S) == N) else $error("N must be a power of two");
    assert (LAT >= S) else $error("LAT must cover the log2(N) butterfly stages");
  end

endmodule
