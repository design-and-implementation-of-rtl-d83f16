// twiddle_cmul: multiplies a complex sample b by a twiddle factor
// W = cos(t) - j sin(t) using four unsigned Vedic multipliers.
//
//   Re(bW) = Re(b) cos(t) + Im(b) sin(t)
//   Im(bW) = Im(b) cos(t) - Re(b) sin(t)
//
// The twiddle arrives in sign-magnitude form (magnitudes |cos|, |sin| in
// Q2.14 plus sign bits), as produced by the CORDIC quadrant unit. Each sample
// component is split into sign and magnitude, the magnitudes go through a
// vedic_mult, the 14 fraction bits of the product are removed by rounding
// half away from zero, and the sign (XOR of the operand signs) is put back
// before the two terms are added.
//
// Combinational. Output width IN_W+1 holds |Re|,|Im| <= sqrt(2)*|b|max for
// any twiddle of unit magnitude (|cos|+|sin| <= sqrt(2)); twiddles much
// larger than 1.0 are outside the intended use and may wrap.
// Using the Vedic multiplier for the FFT products follows the source; the
// sign-magnitude handling and the rounding are this design's choices.
module twiddle_cmul
  import cfft_pkg::*;
#(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0] b_re,
  input  logic signed [IN_W-1:0] b_im,
  input  twiddle_t               w,
  output logic signed [IN_W:0]   p_re,
  output logic signed [IN_W:0]   p_im
);

  localparam int unsigned PW = IN_W + TW_W;  // unsigned product width
  localparam int unsigned TW = IN_W + 3;     // signed width of one term

  logic [IN_W-1:0] mag_re, mag_im;
  logic [PW-1:0]   p_rc, p_is, p_ic, p_rs;   // |re|*|cos|, |im|*|sin|, ...

  assign mag_re = b_re[IN_W-1] ? IN_W'(-b_re) : IN_W'(b_re);
  assign mag_im = b_im[IN_W-1] ? IN_W'(-b_im) : IN_W'(b_im);

  vedic_mult #(.A_W(IN_W), .B_W(TW_W)) u_rc (.a(mag_re), .b(w.cos_mag), .p(p_rc));
  vedic_mult #(.A_W(IN_W), .B_W(TW_W)) u_is (.a(mag_im), .b(w.sin_mag), .p(p_is));
  vedic_mult #(.A_W(IN_W), .B_W(TW_W)) u_ic (.a(mag_im), .b(w.cos_mag), .p(p_ic));
  vedic_mult #(.A_W(IN_W), .B_W(TW_W)) u_rs (.a(mag_re), .b(w.sin_mag), .p(p_rs));

  // Round a Q.14 magnitude product to an integer and apply its sign.
  function automatic logic signed [TW-1:0] term(input logic [PW-1:0] prod, input logic neg);
    logic [PW-1:0] r;
    r = (prod + PW'(1 << (TW_FRAC - 1))) >> TW_FRAC;
    return neg ? -TW'(r) : TW'(r);
  endfunction

  logic signed [TW-1:0] t_rc, t_is, t_ic, t_rs, sum_re, sum_im;

  always_comb begin
    t_rc   = term(p_rc, b_re[IN_W-1] ^ w.sign_c);
    t_is   = term(p_is, b_im[IN_W-1] ^ w.sign_s);
    t_ic   = term(p_ic, b_im[IN_W-1] ^ w.sign_c);
    t_rs   = term(p_rs, b_re[IN_W-1] ^ w.sign_s);
    sum_re = t_rc + t_is;
    sum_im = t_ic - t_rs;
    p_re   = sum_re[IN_W:0];
    p_im   = sum_im[IN_W:0];
  end

endmodule
