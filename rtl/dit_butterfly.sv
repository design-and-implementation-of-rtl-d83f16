// dit_butterfly: radix-2 decimation-in-time butterfly.
//
//   p = a + b*W      q = a - b*W
//
// b*W comes from twiddle_cmul (four Vedic products); the additions are plain
// two's complement adders. Outputs grow by two bits over the inputs, which
// holds |Re|,|Im| <= (1 + sqrt(2)) * 2^(IN_W-1) without overflow, so stages
// can be chained without scaling. Combinational; the FFT block places the
// registers. The butterfly shape is the one of the 4-point flow graph; bit
// growth without scaling is this design's choice.
module dit_butterfly
  import cfft_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0] a_re,
  input  logic signed [IN_W-1:0] a_im,
  input  logic signed [IN_W-1:0] b_re,
  input  logic signed [IN_W-1:0] b_im,
  input  twiddle_t               w,
  output logic signed [IN_W+1:0] p_re,
  output logic signed [IN_W+1:0] p_im,
  output logic signed [IN_W+1:0] q_re,
  output logic signed [IN_W+1:0] q_im
);

  logic signed [IN_W:0] bw_re, bw_im;

  twiddle_cmul #(.IN_W(IN_W)) u_cmul (
    .b_re(b_re), .b_im(b_im), .w(w), .p_re(bw_re), .p_im(bw_im)
  );

  always_comb begin
    p_re = (IN_W+2)'(a_re) + (IN_W+2)'(bw_re);
    p_im = (IN_W+2)'(a_im) + (IN_W+2)'(bw_im);
    q_re = (IN_W+2)'(a_re) - (IN_W+2)'(bw_re);
    q_im = (IN_W+2)'(a_im) - (IN_W+2)'(bw_im);
  end

endmodule
