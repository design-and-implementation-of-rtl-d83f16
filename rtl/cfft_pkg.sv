// cfft_pkg: number formats and constants shared by the CORDIC twiddle
// generator and the Vedic-multiplier FFT.
//
// Angles are unsigned degrees in fixed point with ANG_FRAC fraction bits
// (the comparators of the quadrant unit work in degrees, 0..360). Inside the
// CORDIC the residual angle is signed, same scaling. Twiddle factors travel in
// sign-magnitude form: an unsigned magnitude with TW_FRAC fraction bits plus a
// sign bit (1 = negative), which is what the quadrant unit produces and what
// the unsigned Vedic multipliers consume.
//
// All widths here are this design's own choices; the source gives none.
package cfft_pkg;

  // Angle format: degrees, 10 integer bits, 14 fraction bits.
  localparam int ANG_W    = 24;
  localparam int ANG_FRAC = 14;

  // Twiddle magnitude: Q2.14 unsigned (1.0 = 16384).
  localparam int TW_W    = 16;
  localparam int TW_FRAC = 14;

  // CORDIC x/y datapath: signed, 16 fraction bits, 2 guard integer bits.
  localparam int XY_W    = 20;
  localparam int XY_FRAC = 16;

  // Largest number of CORDIC iterations the constant table below covers.
  localparam int MAX_ITER = 20;

  // Whole degrees to the angle format.
  function automatic logic [ANG_W-1:0] deg(input logic [9:0] whole);
    return {whole, ANG_FRAC'(0)};
  endfunction

  // Elementary rotation angles alpha_i = atan(2^-i), in degrees scaled by
  // 2^ANG_FRAC, rounded: round(atan(2^-i) * 180/pi * 2^14), i = 0..19.
  // Hard-wired constants replace the angle ROM of a classic CORDIC.
  function automatic logic signed [ANG_W-1:0] atan_const(input int i);
    case (i)
      0:  return 24'sd737280;
      1:  return 24'sd435242;
      2:  return 24'sd229970;
      3:  return 24'sd116736;
      4:  return 24'sd58595;
      5:  return 24'sd29326;
      6:  return 24'sd14667;
      7:  return 24'sd7334;
      8:  return 24'sd3667;
      9:  return 24'sd1833;
      10: return 24'sd917;
      11: return 24'sd458;
      12: return 24'sd229;
      13: return 24'sd115;
      14: return 24'sd57;
      15: return 24'sd29;
      16: return 24'sd14;
      17: return 24'sd7;
      18: return 24'sd4;
      19: return 24'sd2;
      default: return '0;
    endcase
  endfunction

  // Start value of x: the CORDIC gain correction
  // K(n) = prod_{i<n} 1/sqrt(1 + 2^-2i), scaled by 2^XY_FRAC and rounded.
  // Entries for n = 1..7; from n = 8 on the rounded value no longer changes.
  function automatic logic signed [XY_W-1:0] cordic_k(input int n);
    case (n)
      1:       return 20'sd46341;
      2:       return 20'sd41449;
      3:       return 20'sd40211;
      4:       return 20'sd39901;
      5:       return 20'sd39823;
      6:       return 20'sd39803;
      7:       return 20'sd39799;
      default: return 20'sd39797;  // 0.6072529 * 2^16
    endcase
  endfunction

  // Quadrant of an angle in [0, 360) degrees.
  typedef enum logic [1:0] {Q1 = 2'd0, Q2 = 2'd1, Q3 = 2'd2, Q4 = 2'd3} quadrant_e;

  // Twiddle factor W = cos(t) - j sin(t) in sign-magnitude form.
  typedef struct packed {
    logic            sign_c;   // 1: cos(t) < 0
    logic            sign_s;   // 1: sin(t) < 0
    logic [TW_W-1:0] cos_mag;  // |cos(t)|, Q2.14
    logic [TW_W-1:0] sin_mag;  // |sin(t)|, Q2.14
  } twiddle_t;

endpackage
