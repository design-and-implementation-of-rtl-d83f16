// cordic_core: multiplier-less CORDIC in rotation mode, fully unrolled.
//
// N_ITER identical stages are chained without registers. Stage i looks at
// the sign of the residual angle z_i (delta_i = +1 for z_i >= 0, else -1) and
// applies
//
//   x_{i+1} = x_i + delta_i * (y_i >>> i)
//   y_{i+1} = y_i - delta_i * (x_i >>> i)
//   z_{i+1} = z_i - delta_i * atan(2^-i)
//
// so each stage is two shifters, three adder/subtractors and a hard-wired
// angle constant, with no multiplier and no angle ROM. The shifts are
// arithmetic right shifts (scaling by 2^-i). The vector is turned clockwise
// by z_0 in total: with x_0 = K (the gain correction), y_0 = 0 and
// |z_0| <= 99.8 degrees the outputs are x_n = cos(z_0), y_n = -sin(z_0),
// z_n ~ 0, i.e. the real and imaginary part of the twiddle e^{-j z_0}.
//
// x/y: signed, XY_FRAC fraction bits. z: signed degrees, ANG_FRAC fraction
// bits (cfft_pkg). Combinational, the caller registers the result.
// Stage equations, unrolled structure and constant angles follow the source;
// iteration count and widths are this design's choices.
module cordic_core
  import cfft_pkg::*;
#(
  parameter int unsigned N_ITER = 16
) (
  input  logic signed [XY_W-1:0]  x_in,
  input  logic signed [XY_W-1:0]  y_in,
  input  logic signed [ANG_W-1:0] z_in,
  output logic signed [XY_W-1:0]  x_out,
  output logic signed [XY_W-1:0]  y_out,
  output logic signed [ANG_W-1:0] z_out
);

  // One pass of the loop is one stage of the unrolled chain.
  always_comb begin
    logic signed [XY_W-1:0]  x, y, xs, ys;
    logic signed [ANG_W-1:0] z;
    x = x_in;
    y = y_in;
    z = z_in;
    for (int i = 0; i < int'(N_ITER); i++) begin
      xs = x >>> i;
      ys = y >>> i;
      if (!z[ANG_W-1]) begin  // delta_i = +1
        x = x + ys;
        y = y - xs;
        z = z - atan_const(i);
      end else begin          // delta_i = -1
        x = x - ys;
        y = y + xs;
        z = z + atan_const(i);
      end
    end
    x_out = x;
    y_out = y;
    z_out = z;
  end

  initial assert (N_ITER >= 1 && N_ITER <= MAX_ITER)
    else $error("cordic_core: N_ITER must be 1..%0d", MAX_ITER);

endmodule
