// tb_vedic_mult: checks the Urdhva-Tiryakbhyam multiplier against the
// built-in product for corner operands and random operands, for a square
// 16x16 and a rectangular 18x16 instance (the two shapes the FFT uses).
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [17:0] a18;
  logic [33:0] p18;

  vedic_mult #(.A_W(16), .B_W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.A_W(18), .B_W(16)) dut18 (.a(a18), .b(b16), .p(p18));

  task automatic check(input logic [17:0] x, input logic [15:0] y);
    a16 = x[15:0]; a18 = x; b16 = y;
    #1;
    checks += 2;
    if (p16 !== 32'(x[15:0]) * 32'(y)) begin
      failures++;
      $display("FAIL 16x16 %0d * %0d = %0d got %0d", x[15:0], y, 32'(x[15:0]) * 32'(y), p16);
    end
    if (p18 !== 34'(x) * 34'(y)) begin
      failures++;
      $display("FAIL 18x16 %0d * %0d = %0d got %0d", x, y, 34'(x) * 34'(y), p18);
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
    check(0, 0); check(1, 1); check(18'h3FFFF, 16'hFFFF); check(14, 15);
    check(95, 94); check(18'h20000, 16'h4000); check(18'h0FFFF, 16'h8000);
    for (int n = 0; n < 3000; n++) check(18'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
