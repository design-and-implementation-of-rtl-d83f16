// modified_cordic: twiddle-factor generator for any angle from 0 to 360
// degrees, built from the comparator front end (cordic_quadrant) and the
// unrolled multiplier-less CORDIC (cordic_core).
//
// The quadrant unit folds theta into phi in [0, 90] degrees and supplies the
// signs of sin(theta) and cos(theta). The core rotates (K, 0) clockwise by
// phi, giving cos(phi) in x and -sin(phi) in y; their magnitudes, rounded from
// 16 to 14 fraction bits, together with the two sign bits form the twiddle
// W = cos(theta) - j sin(theta) in sign-magnitude form (twiddle_t).
//
// Timing: the whole chain is combinational and its result is captured in an
// output register on a cycle with en = 1; valid rises on the next clock
// edge and stays high until reset. Synchronous active-high reset clears the
// register and valid. The structure (comparators, CORDIC, sign outputs)
// follows the source; the enable/valid handshake is this design's choice.
module modified_cordic
  import cfft_pkg::*;
#(
  parameter int unsigned N_ITER = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [ANG_W-1:0] angle,
  output twiddle_t         tw,
  output logic             valid
);

  logic signed [ANG_W-1:0] phi;
  quadrant_e               quad;
  logic                    sign_s, sign_c;
  logic signed [XY_W-1:0]  xn, yn;
  logic signed [ANG_W-1:0] zn;
  twiddle_t                tw_next;

  cordic_quadrant u_quad (
    .theta(angle), .phi(phi), .quad(quad), .sign_s(sign_s), .sign_c(sign_c)
  );

  cordic_core #(.N_ITER(N_ITER)) u_core (
    .x_in(cordic_k(int'(N_ITER))), .y_in('0), .z_in(phi),
    .x_out(xn), .y_out(yn), .z_out(zn)
  );

  // |v| rounded from XY_FRAC to TW_FRAC fraction bits.
  function automatic logic [TW_W-1:0] to_mag(input logic signed [XY_W-1:0] v);
    logic [XY_W-1:0] a;
    a = v[XY_W-1] ? XY_W'(-v) : XY_W'(v);
    a = (a + XY_W'(1 << (XY_FRAC - TW_FRAC - 1))) >> (XY_FRAC - TW_FRAC);
    return a[TW_W-1:0];
  endfunction

  always_comb begin
    tw_next.sign_c  = sign_c;
    tw_next.sign_s  = sign_s;
    tw_next.cos_mag = to_mag(xn);
    tw_next.sin_mag = to_mag(yn);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tw    <= '0;
      valid <= 1'b0;
    end else if (en) begin
      tw    <= tw_next;
      valid <= 1'b1;
    end
  end

endmodule
