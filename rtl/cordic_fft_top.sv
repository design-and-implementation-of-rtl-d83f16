// cordic_fft_top: 4-point FFT processor whose twiddle factors come from
// CORDIC generators instead of a ROM and whose products use Vedic
// (Urdhva-Tiryakbhyam) multipliers.
//
// Blocks and connections:
//   - fft_controller sequences start-up after reset;
//   - two fixed angle constants, 0 and 90 degrees (the twiddle angles
//     360*k/4 for k = 0, 1), feed
//   - two modified_cordic blocks: block 1 makes W4^0 = W2^0 = 1, block 2
//     makes W4^1 = -j, each as cos(t) - j sin(t) in sign-magnitude form;
//   - fft4_vedic, the parallel 4-point DIT FFT, takes the twiddles and the
//     input vector.
//
// Interface: x_re/x_im carry x(0..3) in natural order (signed DATA_W bits);
// X_re/X_im carry F(0..3) in natural order (DATA_W+4 bits), with F(k) =
// sum_n x(n) e^{-j 2 pi n k / 4}, unscaled.
//
// Timing: after reset is released ready rises on the third clock edge (the
// twiddles are then computed and held). From then on one vector is accepted
// every cycle in which in_valid is high; its result appears two clock edges
// later with out_valid = 1. Vectors offered while ready is low are ignored.
// Synchronous active-high reset.
// Block structure follows the source; widths, iteration count, timing and
// handshake are this design's choices.
module cordic_fft_top
  import cfft_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned N_ITER = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [4],
  input  logic signed [DATA_W-1:0] x_im [4],
  output logic                     ready,
  output logic                     out_valid,
  output logic signed [DATA_W+3:0] X_re [4],
  output logic signed [DATA_W+3:0] X_im [4]
);

  // Twiddle angles 360*k/N for N = 4, k = 0 and 1.
  localparam logic [ANG_W-1:0] ANGLE_W0 = deg(0);
  localparam logic [ANG_W-1:0] ANGLE_W1 = deg(90);

  logic     cordic_en, fft_en;
  logic     valid_1, valid_2;
  twiddle_t tw_1, tw_2;

  fft_controller u_ctrl (
    .clk(clk), .rst(rst), .cordic_valid(valid_1 && valid_2),
    .cordic_en(cordic_en), .fft_en(fft_en), .ready(ready)
  );

  modified_cordic #(.N_ITER(N_ITER)) u_cordic_1 (
    .clk(clk), .rst(rst), .en(cordic_en), .angle(ANGLE_W0), .tw(tw_1), .valid(valid_1)
  );

  modified_cordic #(.N_ITER(N_ITER)) u_cordic_2 (
    .clk(clk), .rst(rst), .en(cordic_en), .angle(ANGLE_W1), .tw(tw_2), .valid(valid_2)
  );

  fft4_vedic #(.DATA_W(DATA_W)) u_fft (
    .clk(clk), .rst(rst), .en(fft_en), .in_valid(in_valid),
    .x_re(x_re), .x_im(x_im),
    .w2_0(tw_1), .w4_0(tw_1), .w4_1(tw_2),
    .out_valid(out_valid), .X_re(X_re), .X_im(X_im)
  );

endmodule
