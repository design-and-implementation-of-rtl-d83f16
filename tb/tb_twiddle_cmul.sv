// tb_twiddle_cmul: checks the complex twiddle product against a reference
// built from the language's own signed multiply, with the same rounding rule
// (each real product rounded half away from zero after dropping 14 fraction
// bits). Covers all sign combinations, the extreme sample values and
// twiddles for many angles.
module tb_twiddle_cmul;
  import cfft_pkg::*;
  int checks = 0, failures = 0;

  logic signed [15:0] b_re, b_im;
  twiddle_t           w;
  logic signed [16:0] p_re, p_im;

  twiddle_cmul dut (.b_re(b_re), .b_im(b_im), .w(w), .p_re(p_re), .p_im(p_im));

  function automatic longint rterm(longint x, longint mag, bit neg);
    longint ax, r;
    ax = (x < 0) ? -x : x;
    r  = (ax * mag + 8192) / 16384;
    return (((x < 0) ? 1 : 0) ^ neg) ? -r : r;
  endfunction

  task automatic check(input int bre, input int bim, input int ang_deg_x10);
    real t;
    longint c, s, er, ei;
    t = ang_deg_x10 * 3.14159265358979 / 1800.0;
    c = longint'($rtoi($floor($cos(t) * 16384.0 + 0.5)));
    s = longint'($rtoi($floor($sin(t) * 16384.0 + 0.5)));
    w.sign_c  = c < 0;
    w.sign_s  = s < 0;
    w.cos_mag = 16'((c < 0) ? -c : c);
    w.sin_mag = 16'((s < 0) ? -s : s);
    b_re = 16'(bre);
    b_im = 16'(bim);
    #1;
    er = rterm(bre, (c < 0) ? -c : c, c < 0) + rterm(bim, (s < 0) ? -s : s, s < 0);
    ei = rterm(bim, (c < 0) ? -c : c, c < 0) - rterm(bre, (s < 0) ? -s : s, s < 0);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("FAIL b=(%0d,%0d) ang=%0d/10 got (%0d,%0d) exp (%0d,%0d)",
               bre, bim, ang_deg_x10, p_re, p_im, er, ei);
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
    check(1000, 0, 0);    check(1000, 0, 900);  check(0, 1000, 900);
    check(-32768, -32768, 450); check(32767, -32768, 1350);
    check(-32768, 32767, 2250); check(12345, -54, 3150);
    for (int n = 0; n < 2000; n++)
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(3599)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
