// fir_ds: digit-serial transposed-form FIR filter with an MCM multiplier block.
//
// y[n] = sum_{k=0}^{NTAPS-1} h[k] x[n-k], where every h[k] is 29 or 43
// (TAP_IS_43 bit k selects 43). In the transposed form the input is
// multiplied by all coefficients at once, which is the multiple constant
// multiplication done by mcm_29_43 with shared partial products, and the
// products are summed along a chain
//   p[NTAPS-1] = h[NTAPS-1] x
//   p[k]       = h[k] x + z^-1 p[k+1]
//   y          = p[0]
// built from digit-serial adders (ds_add) and one-word delays
// (ds_word_delay). All streams share the word framing given by start.
//
// Timing: y digit k appears in the same cycle as x digit k of the same
// sample. Interface: x must be a two's complement sample sign-extended to
// YW bits and sent least significant digit first, YW/D cycles per sample;
// y is YW bits, exact as long as the true sum fits. Transposed form and
// the MCM block follow the reference architecture; tap count, coefficient
// order and word length are this design's choice.
module fir_ds #(
  parameter int unsigned      D         = fir_ds_pkg::DIGIT,
  parameter int unsigned      YW        = fir_ds_pkg::WORD_W,
  parameter int unsigned      NTAPS     = fir_ds_pkg::NTAPS,
  parameter logic [NTAPS-1:0] TAP_IS_43 = fir_ds_pkg::TAP_IS_43
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [D-1:0] x,
  output logic [D-1:0] y
);
  localparam int unsigned WORD_DIGITS = YW / D;

  logic [D-1:0] m29, m43;
  logic [D-1:0] prod [NTAPS];
  logic [D-1:0] p    [NTAPS];

  mcm_29_43 #(.D(D)) u_mcm (.clk, .rst_n, .start, .x, .y29(m29), .y43(m43));

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    assign prod[k] = TAP_IS_43[k] ? m43 : m29;
    if (k == NTAPS - 1) begin : g_end
      assign p[k] = prod[k];
    end else begin : g_acc
      logic [D-1:0] dly;
      ds_word_delay #(.D(D), .WORD_DIGITS(WORD_DIGITS)) u_dly (
        .clk, .rst_n, .din(p[k+1]), .dout(dly));
      ds_add #(.D(D)) u_add (.clk, .rst_n, .start, .a(prod[k]), .b(dly), .s(p[k]));
    end
  end

  assign y = p[0];

  initial begin
    assert (YW % D == 0) else $error("fir_ds: YW must be a multiple of D");
  end
endmodule
