// ds_sub: digit-serial subtractor, s = a - b.
//
// Two's complement subtraction as a + ~b + 1: the D bits of b pass through
// D inverters into a ripple of D full adders, and the carry flip-flop is
// initialised to 1 in the first digit of every word (start high), which
// supplies the "+1". Carries between digits are held in that one
// flip-flop; the carry out of a word's last digit is discarded.
//
// Timing: s is combinational in a, b and the carry flip-flop; no latency.
// Interface: start, a, b in; s out. The inverter/flip-flop-set-to-1
// structure is the standard digit-serial subtractor; applying the
// initialisation through start is this design's choice.
module ds_sub #(
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
  logic [D-1:0] bn;

  assign bn = ~b;
  assign c[0] = start ? 1'b1 : c_q;

  // Ripple of D full adders.
  for (genvar i = 0; i < D; i++) begin : g_fa
    assign s[i]   = a[i] ^ bn[i] ^ c[i];
    assign c[i+1] = (a[i] & bn[i]) | (c[i] & (a[i] ^ bn[i]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c_q <= 1'b1;
    else        c_q <= c[D];
endmodule
