// fir_ds_pkg: shared sizes of the digit-serial FIR filter.
//
// DIGIT is the number of bits processed per clock (d). A sample of
// SAMPLE_W bits is sign-extended to a serial word of WORD_W bits, sent
// least significant digit first over WORD_DIGITS = WORD_W/DIGIT cycles.
// The digit size 2 and the tap constants 29 and 43 follow the worked MCM
// example this filter is built around; the word widths are this design's
// choice, picked so that no filter output can overflow the word.
package fir_ds_pkg;
  parameter int unsigned DIGIT       = 2;
  parameter int unsigned SAMPLE_W    = 8;
  parameter int unsigned WORD_W      = 16;
  parameter int unsigned WORD_DIGITS = WORD_W / DIGIT;

  // Default tap order h[0..3] = 29, 43, 43, 29 (symmetric, linear phase).
  // Bit k set means tap k is 43, clear means 29 (the two MCM outputs).
  parameter int unsigned NTAPS = 4;
  parameter logic [NTAPS-1:0] TAP_IS_43 = 4'b0110;
endpackage
