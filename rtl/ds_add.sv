// ds_add: digit-serial adder.
//
// Adds two two's complement words that arrive least significant digit
// first, D bits per clock. It is a ripple of D full adders whose carry out
// is stored in one flip-flop and fed back as the carry in of the next digit.
// In the first digit of each word (start high) the stored carry is replaced
// by 0, which is the flip-flop's per-word initialisation; any carry out of
// the last digit of a word is thereby discarded (arithmetic modulo the
// word length).
//
// Timing: the sum digit s is combinational in a, b and the carry flip-flop,
// so the adder adds no latency. Interface: start, a, b in; s out.
// The structure (D full adders, one flip-flop) follows the standard
// digit-serial adder; applying the initialisation through start and the
// asynchronous reset are this design's choices.
module ds_add #(
  parameter int unsigned D = fir_ds_pkg::DIGIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);
  logic c_q;
  logic [D:0] c;

  assign c[0] = start ? 1'b0 : c_q;

  // Ripple of D full adders.
  for (genvar i = 0; i < D; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c_q <= 1'b0;
    else        c_q <= c[D];
endmodule
