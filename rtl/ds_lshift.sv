// ds_lshift: digit-serial left shift by S bit positions (times 2^S).
//
// In a bit-parallel design a constant shift is only wiring; in a
// digit-serial stream it is a delay of S bit positions, which costs exactly
// S flip-flops. The flip-flops hold the S most recent stream bits not yet
// sent on; each cycle the output digit is the low D bits of
// {din, held bits} and the high S bits are kept. Bit lane j of the output
// is therefore fed from lane (j - S) mod D, S/D or S/D+1 digits earlier,
// so the flip-flops sit in D layers, one per bit lane.
// In the first digit of a word (start high) zeros replace the held bits,
// so bits shifted out of the top of the previous word are dropped and zeros
// enter at the bottom of the new word.
//
// Timing: dout is combinational in din and the flip-flops. Interface:
// start, din in; dout out. S = 0 gives a plain wire.
module ds_lshift #(
  parameter int unsigned D = fir_ds_pkg::DIGIT,
  parameter int unsigned S = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [D-1:0] din,
  output logic [D-1:0] dout
);
  if (S == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [S-1:0]   held_q;
    logic [D+S-1:0] v;

    always_comb begin
      v    = {din, (start ? '0 : held_q)};
      dout = v[D-1:0];
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) held_q <= '0;
      else        held_q <= v[D+S-1:D];
  end
endmodule
