// 16-point 16-parallel FFT wrapper with a valid/ready stream interface.
//
// Adapts the fully parallel FFT core to the XDMA-based system, where one 512-bit H2C/C2H stream carries a whole frame. In_FFT and Out_FFT are
// 512 bits wide: the low half holds the 16 real parts and the high half
// the 16 imaginary parts, each a signed 16-bit sample, sample i of a half
// at bits 16*i+15:16*i (the bins leave in the same layout, bin k at the
// position of sample k).
//
// Handshake: the FFT accepts a frame on every cycle, so ready_in is held at
// 1. valid_in travels through a 13-stage shift register (the FFT latency)
// and comes out as valid_out together with the transformed frame, 13 clock
// cycles after the frame entered. ready_out is the output FIFO's ready; the
// FFT cannot stall, so a frame leaving while ready_out is low is lost (the
// valid/ready verifier counts such losses). rst is active low.
//
// The bus layout, the constant ready_in, the latency and the valid shift
// register follow the design this implements; the sample order inside each
// half is this design's choice.
module fpfft16_top
  import pcie_fft_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned LAT = FFT16_LAT
) (
  input  logic                    clk,
  input  logic                    rst,        // active low
  input  logic                    valid_in,
  output logic                    ready_in,
  input  logic [2*N*SAMPLE_W-1:0] In_FFT,
  output logic                    valid_out,
  input  logic                    ready_out,
  output logic [2*N*SAMPLE_W-1:0] Out_FFT
);

  logic signed [SAMPLE_W-1:0] x_re [N];
  logic signed [SAMPLE_W-1:0] x_im [N];
  logic signed [SAMPLE_W-1:0] y_re [N];
  logic signed [SAMPLE_W-1:0] y_im [N];

  for (genvar i = 0; i < N; i++) begin : g_lanes
    assign x_re[i] = In_FFT[SAMPLE_W*i +: SAMPLE_W];
    assign x_im[i] = In_FFT[N*SAMPLE_W + SAMPLE_W*i +: SAMPLE_W];
    assign Out_FFT[SAMPLE_W*i +: SAMPLE_W]            = y_re[i];
    assign Out_FFT[N*SAMPLE_W + SAMPLE_W*i +: SAMPLE_W] = y_im[i];
  end

  assign ready_in = 1'b1;

  fft_parallel #(.N(N), .W(SAMPLE_W), .LAT(LAT)) u_fft (
    .clk  (clk),
    .x_re (x_re),
    .x_im (x_im),
    .y_re (y_re),
    .y_im (y_im)
  );

  valid_pipeline #(.LAT(LAT)) u_valid (
    .clk       (clk),
    .rst_n     (rst),
    .valid_in  (valid_in),
    .valid_out (valid_out)
  );

  // ready_out only decides whether the consumer takes the frame; it has no
  // effect inside the FFT.
  logic unused_ready_out;
  assign unused_ready_out = ready_out;

endmodule
