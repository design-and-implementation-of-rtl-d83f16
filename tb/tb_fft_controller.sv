// tb_fft_controller: checks the start-up sequence cycle by cycle: after
// reset cordic_en is high for exactly one cycle, the controller waits (with
// fft_en and ready low) for as long as cordic_valid stays low, and ready and
// fft_en rise on the edge after cordic_valid. Repeated with different CORDIC
// delays, including a reset in the middle of a run.
module tb_fft_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, cordic_valid = 0;
  logic cordic_en, fft_en, ready;

  fft_controller dut (.clk(clk), .rst(rst), .cordic_valid(cordic_valid),
                      .cordic_en(cordic_en), .fft_en(fft_en), .ready(ready));

  always #5 clk = ~clk;

  task automatic expect_out(input logic e_en, input logic e_fft, input string what);
    checks++;
    if (cordic_en !== e_en || fft_en !== e_fft || ready !== e_fft) begin
      failures++;
      $display("FAIL %s: cordic_en=%0d fft_en=%0d ready=%0d", what, cordic_en, fft_en, ready);
    end
  endtask

  // Release reset, model CORDIC blocks that take 'delay' cycles after en.
  task automatic run(input int delay);
    int gen_cycle;
    @(negedge clk);
    rst = 1; cordic_valid = 0;
    @(negedge clk);
    expect_out(0, 0, "in reset");
    rst = 0;
    @(negedge clk);                       // S_RESET -> S_GEN on this edge
    expect_out(1, 0, "generate cycle");
    @(negedge clk);
    expect_out(0, 0, "first wait cycle");
    for (int c = 1; c < delay; c++) begin
      @(negedge clk);
      expect_out(0, 0, "waiting for CORDIC");
    end
    cordic_valid = 1;
    @(negedge clk);
    expect_out(0, 1, "running");
    repeat (5) begin
      @(negedge clk);
      expect_out(0, 1, "still running");
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
    run(1);
    run(4);
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
