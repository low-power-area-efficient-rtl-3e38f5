// ds_deserializer: digit-serial-to-parallel converter.
//
// Shifts incoming LSB-first digits into a YW-bit register. In the cycle
// where `last` is high the final (most significant) digit completes the
// word, which is loaded into y_out at that clock edge; y_valid is high for
// the one following cycle.
//
// Timing: a word whose last digit arrives in cycle t is on y_out, with
// y_valid, in cycle t+1 and stays on y_out until the next word.
// This converter is this design's choice.
module ds_deserializer #(
  parameter int unsigned D  = fir_ds_pkg::DIGIT,
  parameter int unsigned YW = fir_ds_pkg::WORD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          last,
  input  logic [D-1:0]  digit,
  output logic [YW-1:0] y_out,
  output logic          y_valid
);
  logic [YW-1:D] sr_q;   // the top YW-D bits received so far
  logic [YW-1:0] word;

  assign word = {digit, sr_q};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr_q    <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      sr_q    <= word[YW-1:D];
      y_valid <= last;
      if (last) y_out <= word;
    end
endmodule
