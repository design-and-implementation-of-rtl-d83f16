// tb_modified_cordic: asks the twiddle generator for angles all around the
// circle and checks the signed values (sign bit applied to each magnitude)
// against cos(theta) and sin(theta) in floating point, to 4 LSB of 2^-14.
// Also checks the timing: valid is low after reset, the result appears on
// the clock edge after en, and the output holds while en is low.
module tb_modified_cordic;
  import cfft_pkg::*;
  int checks = 0, failures = 0;
  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  localparam real PI = 3.14159265358979;

  logic             clk = 0, rst = 1, en = 0;
  logic [ANG_W-1:0] angle = '0;
  twiddle_t         tw;
  logic             valid;

  modified_cordic dut (.clk(clk), .rst(rst), .en(en), .angle(angle), .tw(tw), .valid(valid));

  always #5 clk = ~clk;

  function automatic real sval(input logic s, input logic [TW_W-1:0] m);
    return s ? -real'(m) : real'(m);
  endfunction

  task automatic check_angle(input real d);
    real t;
    twiddle_t held;
    t = d * PI / 180.0;
    @(negedge clk);
    angle = ANG_W'($rtoi(d * 16384.0));
    en = 1;
    @(negedge clk);
    en = 0;
    checks++;
    if (!valid || rabs(sval(tw.sign_c, tw.cos_mag) - $cos(t) * 16384.0) > 4.0 ||
        rabs(sval(tw.sign_s, tw.sin_mag) - $sin(t) * 16384.0) > 4.0) begin
      failures++;
      $display("FAIL %f deg: cos %s%0d sin %s%0d exp %f %f valid=%0d", d,
               tw.sign_c ? "-" : "+", tw.cos_mag, tw.sign_s ? "-" : "+", tw.sin_mag,
               $cos(t) * 16384.0, $sin(t) * 16384.0, valid);
    end
    // output holds while en is low
    held = tw;
    angle = angle + ANG_W'(7 * 16384);
    @(negedge clk);
    checks++;
    if (tw !== held) begin
      failures++;
      $display("FAIL output changed without en");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid high after reset"); end
    check_angle(0.0);   check_angle(90.0);  check_angle(180.0); check_angle(270.0);
    check_angle(45.0);  check_angle(135.0); check_angle(225.0); check_angle(315.0);
    check_angle(359.99);
    for (int d = 0; d < 360; d += 5) check_angle(real'(d) + 0.25);
    for (int n = 0; n < 300; n++) check_angle(real'($urandom_range(359999)) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
