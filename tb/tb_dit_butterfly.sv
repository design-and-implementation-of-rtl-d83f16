// tb_dit_butterfly: checks p = a + bW and q = a - bW against an independent
// reference (built-in signed multiply, same rounding of each real product),
// including extreme inputs where the two guard bits of the output are needed.
module tb_dit_butterfly;
  import cfft_pkg::*;
  int checks = 0, failures = 0;

  logic signed [15:0] a_re, a_im, b_re, b_im;
  twiddle_t           w;
  logic signed [17:0] p_re, p_im, q_re, q_im;

  dit_butterfly dut (.a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w(w),
                                  .p_re(p_re), .p_im(p_im), .q_re(q_re), .q_im(q_im));

  function automatic longint rterm(longint x, longint c);
    longint ax, ac, r;
    ax = (x < 0) ? -x : x;
    ac = (c < 0) ? -c : c;
    r  = (ax * ac + 8192) / 16384;
    return ((x < 0) ^ (c < 0)) ? -r : r;
  endfunction

  task automatic check(input int are, input int aim, input int bre, input int bim, input int ang_x10);
    real t;
    longint c, s, bwr, bwi;
    t = ang_x10 * 3.14159265358979 / 1800.0;
    c = longint'($rtoi($floor($cos(t) * 16384.0 + 0.5)));
    s = longint'($rtoi($floor($sin(t) * 16384.0 + 0.5)));
    w = '{sign_c: c < 0, sign_s: s < 0, cos_mag: 16'((c < 0) ? -c : c), sin_mag: 16'((s < 0) ? -s : s)};
    a_re = 16'(are); a_im = 16'(aim); b_re = 16'(bre); b_im = 16'(bim);
    #1;
    bwr = rterm(bre, c) + rterm(bim, s);
    bwi = rterm(bim, c) - rterm(bre, s);
    checks++;
    if (longint'(p_re) != are + bwr || longint'(p_im) != aim + bwi ||
        longint'(q_re) != are - bwr || longint'(q_im) != aim - bwi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) ang=%0d/10: p=(%0d,%0d) q=(%0d,%0d) bw=(%0d,%0d)",
               are, aim, bre, bim, ang_x10, p_re, p_im, q_re, q_im, bwr, bwi);
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
    check(5, 7, 3, -2, 0);
    check(100, 0, 50, 0, 900);
    check(32767, 32767, 32767, 32767, 3150);
    check(-32768, -32768, -32768, -32768, 1350);
    check(-32768, 32767, 32767, -32768, 450);
    for (int n = 0; n < 2000; n++)
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(3599)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
