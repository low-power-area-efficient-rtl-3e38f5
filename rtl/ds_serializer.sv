// ds_serializer: parallel-to-digit-serial converter.
//
// In the cycle where start is high, the XW-bit two's complement sample on
// x_in is sign-extended to YW bits; its least significant digit goes out
// at once and the rest is loaded into a shift register that sends one
// D-bit digit per cycle for the following YW/D-1 cycles.
//
// Timing: digit k of a sample taken in cycle t is on `digit` in cycle t+k.
// This converter is this design's choice; the filter only needs the
// samples as LSB-first digit streams.
module ds_serializer #(
  parameter int unsigned D  = fir_ds_pkg::DIGIT,
  parameter int unsigned XW = fir_ds_pkg::SAMPLE_W,
  parameter int unsigned YW = fir_ds_pkg::WORD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x_in,
  output logic [D-1:0]  digit
);
  logic [YW-1:0] ext;
  logic [YW-1:0] sr_q;

  assign ext   = YW'(signed'(x_in));
  assign digit = start ? ext[D-1:0] : sr_q[D-1:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sr_q <= '0;
    else if (start) sr_q <= ext >> D;
    else            sr_q <= sr_q >> D;

  initial begin
    assert (XW <= YW) else $error("ds_serializer: XW must not exceed YW");
  end
endmodule
