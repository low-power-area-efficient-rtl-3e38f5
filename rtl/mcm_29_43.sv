// mcm_29_43: digit-serial multiple constant multiplication of x by 29 and 43.
//
// The two products share the partial product 7x, which the graph-based
// solution finds (a binary common-subexpression search cannot, since 111
// does not appear in 43 = 101011b). The network is:
//   8x  = x << 3                (3 flip-flops)
//   7x  = 8x - x                (digit-serial subtraction)
//   14x = 7x << 1               (1 flip-flop)
//   28x = 14x << 1              (1 flip-flop)
//   29x = 28x + x               (digit-serial addition)
//   43x = 29x + 14x             (digit-serial addition)
// That is two additions, one subtraction and five shift flip-flops, against
// six additions for the two products built independently from binary.
// Reusing 14x for 28x keeps the shift cost at five flip-flops.
//
// Timing: every operator is combinational per digit with its state in
// flip-flops, so digit k of 29x and 43x appears in the same cycle as digit k
// of x. Interface: start marks the least significant digit of each word;
// results are exact modulo 2^(word length), so the caller must sign-extend x
// to a word wide enough for 43x.
module mcm_29_43 #(
  parameter int unsigned D = fir_ds_pkg::DIGIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [D-1:0] x,
  output logic [D-1:0] y29,
  output logic [D-1:0] y43
);
  logic [D-1:0] x8, x7, x14, x28;

  ds_lshift #(.D(D), .S(3)) u_sh8  (.clk, .rst_n, .start, .din(x),   .dout(x8));
  ds_sub    #(.D(D))        u_sub7 (.clk, .rst_n, .start, .a(x8),    .b(x),   .s(x7));
  ds_lshift #(.D(D), .S(1)) u_sh14 (.clk, .rst_n, .start, .din(x7),  .dout(x14));
  ds_lshift #(.D(D), .S(1)) u_sh28 (.clk, .rst_n, .start, .din(x14), .dout(x28));
  ds_add    #(.D(D))        u_add29(.clk, .rst_n, .start, .a(x28),   .b(x),   .s(y29));
  ds_add    #(.D(D))        u_add43(.clk, .rst_n, .start, .a(y29),   .b(x14), .s(y43));
endmodule
