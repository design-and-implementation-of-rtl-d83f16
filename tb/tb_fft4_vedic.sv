// tb_fft4_vedic: feeds the 4-point FFT block with exact twiddles (W2^0 =
// W4^0 = 1, W4^1 = -j) and compares every output vector with the DFT
// computed in integer arithmetic, where multiplying by e^{-j pi/2 nk} is a
// swap and negation. Random and extreme vectors, back-to-back vectors,
// gaps, and vectors offered with en low (which must be dropped). The
// latency of two clock edges is checked by tagging every vector with the
// cycle it entered.
module tb_fft4_vedic;
  import cfft_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, en = 0, in_valid = 0;
  logic signed [15:0] x_re [4], x_im [4];
  logic signed [19:0] X_re [4], X_im [4];
  logic out_valid;
  twiddle_t w_one, w_mj;

  fft4_vedic dut (.clk(clk), .rst(rst), .en(en), .in_valid(in_valid),
    .x_re(x_re), .x_im(x_im), .w2_0(w_one), .w4_0(w_one), .w4_1(w_mj),
    .out_valid(out_valid), .X_re(X_re), .X_im(X_im));

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, queued with the cycle they are due
  int exp_q [$];    // per vector: due cycle, then F(0..3) re, im
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

  // drive one vector during the coming cycle
  task automatic drive(input int xr [4], input int xi [4], input bit v, input bit e);
    int fr [4], fi [4];
    @(negedge clk);
    for (int n = 0; n < 4; n++) begin x_re[n] = 16'(xr[n]); x_im[n] = 16'(xi[n]); end
    in_valid = v;
    en = e;
    if (v && e) begin
      ref_dft(xr, xi, fr, fi);
      exp_q.push_back(cycle + 2);
      for (int k = 0; k < 4; k++) begin
        exp_q.push_back(fr[k]);
        exp_q.push_back(fi[k]);
      end
      pending++;
    end
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

  // checker: compare on every edge where out_valid is high
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (pending == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        int er [4], ei [4], ec;
        bit bad;
        ec = exp_q.pop_front();
        for (int k = 0; k < 4; k++) begin
          er[k] = exp_q.pop_front();
          ei[k] = exp_q.pop_front();
        end
        pending--;
        bad = (ec != cycle);
        for (int k = 0; k < 4; k++)
          if (int'(X_re[k]) != er[k] || int'(X_im[k]) != ei[k]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL at cycle %0d (due %0d): F0=(%0d,%0d)/(%0d,%0d) F1=(%0d,%0d)/(%0d,%0d)",
                   cycle, ec, X_re[0], X_im[0], er[0], ei[0], X_re[1], X_im[1], er[1], ei[1]);
        end
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [4], xi [4];
    w_one = '{sign_c: 1'b0, sign_s: 1'b0, cos_mag: 16'd16384, sin_mag: 16'd0};
    w_mj  = '{sign_c: 1'b0, sign_s: 1'b0, cos_mag: 16'd0,     sin_mag: 16'd16384};
    for (int n = 0; n < 4; n++) begin x_re[n] = 0; x_im[n] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    // impulse, constant, alternating
    drive('{1, 0, 0, 0}, '{0, 0, 0, 0}, 1, 1);
    drive('{1, 1, 1, 1}, '{0, 0, 0, 0}, 1, 1);
    drive('{1, -1, 1, -1}, '{0, 0, 0, 0}, 1, 1);
    drive('{0, 1, 0, 0}, '{0, 0, 0, 0}, 1, 1);
    drive('{3, 5, -7, 11}, '{2, -4, 6, -8}, 1, 1);
    // with en low the vector must be dropped
    rand_vec(xr, xi, 0); drive(xr, xi, 1, 0);
    drive(xr, xi, 0, 1);
    for (int i = 0; i < 500; i++) begin
      rand_vec(xr, xi, i % 7 == 0);
      drive(xr, xi, $urandom_range(3) != 0, 1);
    end
    drive(xr, xi, 0, 1);
    repeat (4) @(negedge clk);
    checks++;
    if (pending != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", pending);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
