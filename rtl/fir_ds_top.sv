// fir_ds_top: digit-serial FIR filter with a parallel sample interface.
//
// A digit counter frames the serial words; the serializer takes one XW-bit
// sample per word and sends it, sign-extended to YW bits, D bits per clock
// into the digit-serial transposed-form FIR (fir_ds, whose multiplier block
// is the shared-partial-product MCM for 29x and 43x); the deserializer
// reassembles each YW-bit output sample.
//
// Timing: one sample every YW/D cycles (8 cycles at the defaults d=2,
// 16-bit words). x_take is high in the cycle in which x_in is sampled; the
// matching y_out is valid, with y_valid high for one cycle, YW/D cycles
// later. Filter taps are 29, 43, 43, 29. The digit-serial datapath
// follows the reference architecture; word widths, tap set, framing and
// the parallel interface are this design's choices.
module fir_ds_top #(
  parameter int unsigned D  = fir_ds_pkg::DIGIT,
  parameter int unsigned XW = fir_ds_pkg::SAMPLE_W,
  parameter int unsigned YW = fir_ds_pkg::WORD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_in,
  output logic          x_take,
  output logic [YW-1:0] y_out,
  output logic          y_valid
);
  logic         start, last;
  logic [D-1:0] xd, yd;

  digit_ctrl #(.WORD_DIGITS(YW / D)) u_ctrl (.clk, .rst_n, .start, .last);

  ds_serializer #(.D(D), .XW(XW), .YW(YW)) u_ser (
    .clk, .rst_n, .start, .x_in, .digit(xd));

  fir_ds #(.D(D), .YW(YW)) u_fir (.clk, .rst_n, .start, .x(xd), .y(yd));

  ds_deserializer #(.D(D), .YW(YW)) u_deser (
    .clk, .rst_n, .last, .digit(yd), .y_out, .y_valid);

  assign x_take = start;
endmodule
