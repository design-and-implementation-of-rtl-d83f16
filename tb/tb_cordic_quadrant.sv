// tb_cordic_quadrant: sweeps theta over 0 .. 720 degrees (whole degrees plus
// random fractional angles) and checks the folded angle, the quadrant and
// both sign bits against values worked out with integer arithmetic.
module tb_cordic_quadrant;
  import cfft_pkg::*;
  int checks = 0, failures = 0;

  logic [ANG_W-1:0]        theta;
  logic signed [ANG_W-1:0] phi;
  quadrant_e               quad;
  logic                    sign_s, sign_c;

  cordic_quadrant dut (.theta(theta), .phi(phi), .quad(quad), .sign_s(sign_s), .sign_c(sign_c));

  task automatic check(input int unsigned th);  // th: degrees * 2^14
    int t, ephi, eq;
    bit es, ec;
    theta = ANG_W'(th);
    #1;
    t = int'(th);
    if (t >= 360 * 16384) t -= 360 * 16384;
    if (t <= 90 * 16384)       begin eq = 0; ephi = t;              ec = 0; es = 0; end
    else if (t <= 180 * 16384) begin eq = 1; ephi = 180 * 16384 - t; ec = 1; es = 0; end
    else if (t <= 270 * 16384) begin eq = 2; ephi = t - 180 * 16384; ec = 1; es = 1; end
    else                       begin eq = 3; ephi = 360 * 16384 - t; ec = 0; es = 1; end
    checks++;
    if (int'(phi) != ephi || int'(quad) != eq || sign_s != es || sign_c != ec) begin
      failures++;
      $display("FAIL theta=%0d: phi=%0d/%0d quad=%0d/%0d s=%0d/%0d c=%0d/%0d",
               th, phi, ephi, quad, eq, sign_s, es, sign_c, ec);
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
    for (int d = 0; d < 720; d++) check(d * 16384);
    for (int d = 0; d < 720; d++) check(d * 16384 + 1);
    for (int n = 0; n < 2000; n++) check($urandom_range(720 * 16384 - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
