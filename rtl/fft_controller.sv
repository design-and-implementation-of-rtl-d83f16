// fft_controller: start-up sequencer of the CORDIC based FFT.
//
// The twiddle factors are not stored; they are computed by the two CORDIC
// blocks once after reset. The controller activates the blocks in order:
//
//   S_RESET  (one cycle after reset)        nothing enabled
//   S_GEN    cordic_en = 1 for one cycle    CORDIC output registers load
//   S_WAIT   until cordic_valid = 1         twiddles settle in registers
//   S_RUN    fft_en = 1, ready = 1          FFT block accepts samples
//
// S_RUN is left only by reset. With single-cycle CORDIC blocks ready rises
// three clock edges after reset is released. Synchronous active-high reset.
// A controller that enables each block in sequence is what the source
// describes; the states and their timing are this design's choice.
module fft_controller (
  input  logic clk,
  input  logic rst,
  input  logic cordic_valid,
  output logic cordic_en,
  output logic fft_en,
  output logic ready
);

  typedef enum logic [1:0] {S_RESET, S_GEN, S_WAIT, S_RUN} state_e;
  state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      S_RESET: state_next = S_GEN;
      S_GEN:   state_next = S_WAIT;
      S_WAIT:  if (cordic_valid) state_next = S_RUN;
      S_RUN:   state_next = S_RUN;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= state_next;
  end

  assign cordic_en = (state == S_GEN);
  assign fft_en    = (state == S_RUN);
  assign ready     = (state == S_RUN);

  // The CORDIC blocks must not be re-triggered once the FFT runs.
  a_no_gen_in_run: assert property (@(posedge clk) disable iff (rst)
    fft_en |-> !cordic_en);

endmodule
