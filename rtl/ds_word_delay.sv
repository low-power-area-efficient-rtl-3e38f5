// ds_word_delay: one-sample delay (z^-1) for a digit-serial stream.
//
// In the transposed-form FIR each delay element holds one partial sum. For
// a stream that carries one word every WORD_DIGITS cycles the equivalent is
// a shift register WORD_DIGITS digits deep: the digit that leaves it is the
// same digit position of the previous word, so it lines up with the current
// word without any start signal.
//
// Timing: dout is registered, exactly WORD_DIGITS cycles after din.
// Reset clears it, so the filter starts from rest. Its construction as a
// shift register is this design's choice.
module ds_word_delay #(
  parameter int unsigned D           = fir_ds_pkg::DIGIT,
  parameter int unsigned WORD_DIGITS = fir_ds_pkg::WORD_DIGITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [D-1:0] din,
  output logic [D-1:0] dout
);
  logic [D-1:0] sr_q [WORD_DIGITS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < WORD_DIGITS; i++) sr_q[i] <= '0;
    end else begin
      sr_q[0] <= din;
      for (int i = 1; i < WORD_DIGITS; i++) sr_q[i] <= sr_q[i-1];
    end

  assign dout = sr_q[WORD_DIGITS-1];
endmodule
