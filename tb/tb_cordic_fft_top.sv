// tb_cordic_fft_top: end-to-end test of the CORDIC based 4-point FFT at its
// default parameters (16-bit samples, 16 CORDIC iterations).
//
// After reset the controller must have the two CORDIC blocks produce the
// twiddles and raise ready on the third clock edge. Vectors offered before
// that must be ignored. Then random, extreme and structured vectors are
// streamed with and without gaps, and each result, due two clock edges after
// its vector, is compared with a DFT computed here in integer arithmetic
// (exact twiddles +1, -j, -1, +j). The CORDIC twiddles are accurate to a few
// LSB of 2^-14, so a small tolerance proportional to the input size is
// allowed. A reset in the middle of a stream must restart the sequence.
// Each mechanism (twiddle start-up, dropped early vector, back-to-back
// vectors, gaps, reset restart) is counted and must occur.
module tb_cordic_fft_top;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] x_re [4], x_im [4];
  logic signed [19:0] X_re [4], X_im [4];
  logic ready, out_valid;

  cordic_fft_top dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x_re(x_re), .x_im(x_im),
                      .ready(ready), .out_valid(out_valid), .X_re(X_re), .X_im(X_im));

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_startup = 0, n_dropped = 0, n_back2back = 0, n_gap = 0, n_restart = 0;
  int max_err = 0;
  bit prev_accepted = 0;

  int exp_q [$];    // per vector: due cycle, tolerance, then F(0..3) re, im
  int pending = 0;

  task automatic ref_dft(input int xr [4], input int xi [4], output int fr [4], output int fi [4]);
    for (int k = 0; k < 4; k++) begin
      fr[k] = 0; fi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin fr[k] += xr[n]; fi[k] += xi[n]; end
          1: begin fr[k] += xi[n]; fi[k] -= xr[n]; end
          2: begin fr[k] -= xr[n]; fi[k] -= xi[n]; end
          3: begin fr[k] -= xi[n]; fi[k] += xr[n]; end
        endcase
      end
    end
  endtask

  task automatic drive(input int xr [4], input int xi [4], input bit v);
    int fr [4], fi [4], tol;
    @(negedge clk);
    for (int n = 0; n < 4; n++) begin x_re[n] = 16'(xr[n]); x_im[n] = 16'(xi[n]); end
    in_valid = v;
    if (v && !ready) n_dropped++;
    if (v && ready) begin
      if (prev_accepted) n_back2back++;
      ref_dft(xr, xi, fr, fi);
      tol = 3;
      for (int n = 0; n < 4; n++)
        tol += ((xr[n] < 0 ? -xr[n] : xr[n]) + (xi[n] < 0 ? -xi[n] : xi[n])) * 8 / 16384;
      exp_q.push_back(cycle + 2);
      exp_q.push_back(tol);
      for (int k = 0; k < 4; k++) begin
        exp_q.push_back(fr[k]);
        exp_q.push_back(fi[k]);
      end
      pending++;
    end else if (ready) n_gap++;
    prev_accepted = v && ready;
  endtask

  task automatic rand_vec(output int xr [4], output int xi [4], input bit extreme);
    for (int n = 0; n < 4; n++) begin
      if (extreme) begin
        xr[n] = $urandom_range(1) ? 32767 : -32768;
        xi[n] = $urandom_range(1) ? 32767 : -32768;
      end else begin
        xr[n] = int'($urandom_range(65535)) - 32768;
        xi[n] = int'($urandom_range(65535)) - 32768;
      end
    end
  endtask

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (pending == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int er [4], ei [4], ec, tol, e;
        bit bad;
        ec  = exp_q.pop_front();
        tol = exp_q.pop_front();
        for (int k = 0; k < 4; k++) begin
          er[k] = exp_q.pop_front();
          ei[k] = exp_q.pop_front();
        end
        pending--;
        bad = (ec != cycle);
        for (int k = 0; k < 4; k++) begin
          e = int'(X_re[k]) - er[k]; if (e < 0) e = -e; if (e > max_err) max_err = e;
          if (e > tol) bad = 1;
          e = int'(X_im[k]) - ei[k]; if (e < 0) e = -e; if (e > max_err) max_err = e;
          if (e > tol) bad = 1;
        end
        if (bad) begin
          failures++;
          $display("FAIL cycle %0d (due %0d, tol %0d): F0=(%0d,%0d)/(%0d,%0d) F1=(%0d,%0d)/(%0d,%0d) F3=(%0d,%0d)/(%0d,%0d)",
                   cycle, ec, tol, X_re[0], X_im[0], er[0], ei[0], X_re[1], X_im[1], er[1], ei[1],
                   X_re[3], X_im[3], er[3], ei[3]);
        end
      end
    end
  end

  // Reset, offer vectors until ready, check that ready comes on the 3rd edge.
  task automatic start_up();
    int xr [4], xi [4], t0;
    @(negedge clk);
    rst = 1;
    in_valid = 0;
    @(negedge clk);
    exp_q.delete();
    pending = 0;
    prev_accepted = 0;
    rst = 0;
    t0 = cycle;
    while (!ready) begin
      rand_vec(xr, xi, 0);
      drive(xr, xi, 1);
      if (cycle - t0 > 20) break;
    end
    checks++;
    if (!ready || cycle - t0 != 3) begin
      failures++;
      $display("FAIL ready after %0d edges (expected 3)", cycle - t0);
    end else n_startup++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [4], xi [4];
    for (int n = 0; n < 4; n++) begin x_re[n] = 0; x_im[n] = 0; end
    repeat (3) @(negedge clk);
    start_up();
    drive('{1000, 0, 0, 0}, '{0, 0, 0, 0}, 1);
    drive('{1000, 1000, 1000, 1000}, '{0, 0, 0, 0}, 1);
    drive('{0, 1000, 0, 0}, '{0, 0, 0, 0}, 1);
    drive('{0, 0, 0, 1000}, '{0, 0, 0, 0}, 1);
    drive('{1000, -1000, 1000, -1000}, '{0, 0, 0, 0}, 1);
    drive('{100, 200, 300, 400}, '{0, 0, 0, 0}, 0);
    drive('{100, 200, 300, 400}, '{-5, 6, -7, 8}, 1);
    for (int i = 0; i < 300; i++) begin
      rand_vec(xr, xi, i % 5 == 0);
      drive(xr, xi, $urandom_range(3) != 0);
    end
    // reset in the middle of a stream; results in flight are discarded
    start_up();
    n_restart++;
    for (int i = 0; i < 200; i++) begin
      rand_vec(xr, xi, i % 9 == 0);
      drive(xr, xi, $urandom_range(4) != 0);
    end
    drive(xr, xi, 0);
    repeat (4) @(negedge clk);
    checks++;
    if (pending != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", pending);
    end
    $display("mechanisms: startup=%0d dropped_before_ready=%0d back_to_back=%0d gaps=%0d restart=%0d; max error %0d LSB",
             n_startup, n_dropped, n_back2back, n_gap, n_restart, max_err);
    checks += 5;
    if (n_startup == 0)   begin failures++; $display("FAIL start-up never seen"); end
    if (n_dropped == 0)   begin failures++; $display("FAIL no vector dropped before ready"); end
    if (n_back2back == 0) begin failures++; $display("FAIL no back-to-back vectors"); end
    if (n_gap == 0)       begin failures++; $display("FAIL no gap in the stream"); end
    if (n_restart == 0)   begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
