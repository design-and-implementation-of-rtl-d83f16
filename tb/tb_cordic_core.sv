// tb_cordic_core: drives the unrolled CORDIC with x0 = K, y0 = 0 and angles
// across its convergence range (-99 .. +99 degrees) and compares with the
// cosine and sine computed in floating point: x must approach cos(z0) and
// y must approach -sin(z0) to within 24 LSB of 2^-16, and the residual angle
// must end near zero. A general vector (x0, y0) is also rotated and checked.
module tb_cordic_core;
  import cfft_pkg::*;
  int checks = 0, failures = 0;
  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  localparam real PI = 3.14159265358979;

  logic signed [XY_W-1:0]  x_in, y_in, x_out, y_out;
  logic signed [ANG_W-1:0] z_in, z_out;

  cordic_core dut (.x_in(x_in), .y_in(y_in), .z_in(z_in),
                                  .x_out(x_out), .y_out(y_out), .z_out(z_out));

  task automatic check(input real deg_in, input real x0, input real y0);
    real t, ex, ey;
    t    = deg_in * PI / 180.0;
    x_in = XY_W'($rtoi(x0 * 0.6072529 * 65536.0));
    y_in = XY_W'($rtoi(y0 * 0.6072529 * 65536.0));
    z_in = ANG_W'($rtoi(deg_in * 16384.0));
    #1;
    // clockwise rotation by t
    ex = (x0 * $cos(t) + y0 * $sin(t)) * 65536.0;
    ey = (y0 * $cos(t) - x0 * $sin(t)) * 65536.0;
    checks++;
    if (rabs(real'(x_out) - ex) > 24.0 || rabs(real'(y_out) - ey) > 24.0 ||
        z_out > 40 || z_out < -40) begin
      failures++;
      $display("FAIL angle %f (x0,y0)=(%f,%f): got (%0d,%0d,z=%0d) exp (%f,%f)",
               deg_in, x0, y0, x_out, y_out, z_out, ex, ey);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0.0, 1.0, 0.0);
    check(90.0, 1.0, 0.0);
    check(45.0, 1.0, 0.0);
    check(30.0, 1.0, 0.0);
    check(-60.0, 1.0, 0.0);
    check(99.0, 1.0, 0.0);
    check(-99.0, 1.0, 0.0);
    for (int n = 0; n < 500; n++)
      check((real'($urandom_range(198000)) - 99000.0) / 1000.0, 1.0, 0.0);
    for (int n = 0; n < 200; n++)
      check((real'($urandom_range(180000)) - 90000.0) / 1000.0,
            (real'($urandom_range(2000)) - 1000.0) / 1500.0,
            (real'($urandom_range(2000)) - 1000.0) / 1500.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
