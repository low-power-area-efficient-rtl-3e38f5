// digit_ctrl: word framing for the digit-serial datapath.
//
// A free-running counter over the WORD_DIGITS digits of a serial word.
// start is high while digit 0 (least significant) is on the streams, last
// while digit WORD_DIGITS-1 is. The counter resets to digit 0, so the first
// cycle after reset begins a word. An assertion checks that every last
// digit is followed by a start. WORD_DIGITS = 1 (bit-parallel) holds
// both high every cycle.
module digit_ctrl #(
  parameter int unsigned WORD_DIGITS = fir_ds_pkg::WORD_DIGITS
) (
  input  logic clk,
  input  logic rst_n,
  output logic start,
  output logic last
);
  localparam int unsigned CW = (WORD_DIGITS > 1) ? $clog2(WORD_DIGITS) : 1;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                            cnt_q <= '0;
    else if (cnt_q == CW'(WORD_DIGITS - 1)) cnt_q <= '0;
    else                                   cnt_q <= cnt_q + 1'b1;

  assign start = (cnt_q == '0);
  assign last  = (cnt_q == CW'(WORD_DIGITS - 1));

  // Words follow each other without gaps: a last digit is always followed
  // by the first digit of the next word.
  a_back_to_back: assert property (@(posedge clk) disable iff (!rst_n) last |=> start);
endmodule
