// cordic_quadrant: the comparator front end of the modified CORDIC.
//
// A plain CORDIC converges only for angles within about +/-99.9 degrees.
// This unit lets the twiddle generator take any angle from 0 to 360 degrees:
// three comparators (against 90, 180 and 270 degrees) find the quadrant, the
// angle is folded into the first quadrant, and the signs of sin and cos are
// produced separately:
//
//   quadrant   theta range        phi sent to CORDIC   sign_c  sign_s
//   Q1         [0, 90]            theta                +       +
//   Q2         (90, 180]          180 - theta          -       +
//   Q3         (180, 270]         theta - 180          -       -
//   Q4         (270, 360)         360 - theta          +       -
//
// (sign bit 1 = negative). An angle of 360 degrees or more is first reduced
// by one subtraction of 360. Angles are unsigned degrees with ANG_FRAC
// fraction bits. Combinational. The comparator unit and its sign outputs
// follow the source; the exact boundaries and the wrap are this design's.
module cordic_quadrant
  import cfft_pkg::*;
(
  input  logic [ANG_W-1:0]        theta,
  output logic signed [ANG_W-1:0] phi,
  output quadrant_e               quad,
  output logic                    sign_s,
  output logic                    sign_c
);

  localparam logic [ANG_W-1:0] D90  = deg(90);
  localparam logic [ANG_W-1:0] D180 = deg(180);
  localparam logic [ANG_W-1:0] D270 = deg(270);
  localparam logic [ANG_W-1:0] D360 = deg(360);

  logic [ANG_W-1:0] t;

  always_comb begin
    t = (theta >= D360) ? theta - D360 : theta;
    if (t <= D90) begin
      quad = Q1;
      phi  = t;
    end else if (t <= D180) begin
      quad = Q2;
      phi  = D180 - t;
    end else if (t <= D270) begin
      quad = Q3;
      phi  = t - D180;
    end else begin
      quad = Q4;
      phi  = D360 - t;
    end
    sign_c = (quad == Q2) || (quad == Q3);
    sign_s = (quad == Q3) || (quad == Q4);
  end

endmodule
