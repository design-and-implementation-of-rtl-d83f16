// fft4_vedic: parallel 4-point radix-2 decimation-in-time FFT whose twiddle
// products are formed by Vedic multipliers.
//
// All four butterflies exist in hardware (two per stage), so a full
// 4-sample vector is accepted every clock cycle. The flow graph:
//
//   inputs in bit-reversed order x(0), x(2), x(1), x(3)
//   stage 1:  A,B = x(0) +/- W2^0 x(2)      C,D = x(1) +/- W2^0 x(3)
//   stage 2:  F(0),F(2) = A +/- W4^0 C      F(1),F(3) = B +/- W4^1 D
//
// The twiddles W2^0, W4^0 and W4^1 are inputs in sign-magnitude form
// (twiddle_t) so that they can come from the CORDIC generators instead of a
// table. Every butterfly adds two bits; outputs are DATA_W+4 bits, no
// scaling, no overflow.
//
// Timing: one register after each stage. A vector presented with
// in_valid = 1 and en = 1 appears on X_re/X_im two clock edges later with
// out_valid = 1; vectors may follow back to back. Stage registers load only
// when their incoming valid is high and otherwise hold. Synchronous
// active-high reset clears the valid bits and the data.
// The flow graph and the Vedic products follow the source; the pipeline
// registers and the widths are this design's choices.
module fft4_vedic
  import cfft_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [4],
  input  logic signed [DATA_W-1:0] x_im [4],
  input  twiddle_t                 w2_0,
  input  twiddle_t                 w4_0,
  input  twiddle_t                 w4_1,
  output logic                     out_valid,
  output logic signed [DATA_W+3:0] X_re [4],
  output logic signed [DATA_W+3:0] X_im [4]
);

  localparam int unsigned S1_W = DATA_W + 2;

  // ---- stage 1 -----------------------------------------------------------
  logic signed [S1_W-1:0] s1_re [4], s1_im [4];      // A, B, C, D
  logic signed [S1_W-1:0] r1_re [4], r1_im [4];
  logic                   v1;

  dit_butterfly #(.IN_W(DATA_W)) u_bf_ab (
    .a_re(x_re[0]), .a_im(x_im[0]), .b_re(x_re[2]), .b_im(x_im[2]), .w(w2_0),
    .p_re(s1_re[0]), .p_im(s1_im[0]), .q_re(s1_re[1]), .q_im(s1_im[1])
  );
  dit_butterfly #(.IN_W(DATA_W)) u_bf_cd (
    .a_re(x_re[1]), .a_im(x_im[1]), .b_re(x_re[3]), .b_im(x_im[3]), .w(w2_0),
    .p_re(s1_re[2]), .p_im(s1_im[2]), .q_re(s1_re[3]), .q_im(s1_im[3])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        r1_re[k] <= '0;
        r1_im[k] <= '0;
      end
    end else begin
      v1 <= in_valid && en;
      if (in_valid && en) begin
        r1_re <= s1_re;
        r1_im <= s1_im;
      end
    end
  end

  // ---- stage 2 -----------------------------------------------------------
  logic signed [DATA_W+3:0] s2_re [4], s2_im [4];    // F(0..3)

  dit_butterfly #(.IN_W(S1_W)) u_bf_02 (
    .a_re(r1_re[0]), .a_im(r1_im[0]), .b_re(r1_re[2]), .b_im(r1_im[2]), .w(w4_0),
    .p_re(s2_re[0]), .p_im(s2_im[0]), .q_re(s2_re[2]), .q_im(s2_im[2])
  );
  dit_butterfly #(.IN_W(S1_W)) u_bf_13 (
    .a_re(r1_re[1]), .a_im(r1_im[1]), .b_re(r1_re[3]), .b_im(r1_im[3]), .w(w4_1),
    .p_re(s2_re[1]), .p_im(s2_im[1]), .q_re(s2_re[3]), .q_im(s2_im[3])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        X_re[k] <= '0;
        X_im[k] <= '0;
      end
    end else begin
      out_valid <= v1;
      if (v1) begin
        X_re <= s2_re;
        X_im <= s2_im;
      end
    end
  end

endmodule
