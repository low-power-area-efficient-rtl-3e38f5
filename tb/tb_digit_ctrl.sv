// tb_digit_ctrl: self-checking test of the word framing counter.
//
// After reset start must be high in the first cycle and then every 8th
// cycle, last in the cycle before each start, and never both at once for
// an 8-digit word. A second instance with one digit per word must hold
// both high every cycle.
module tb_digit_ctrl;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic start, last, start1, last1;

  digit_ctrl #(.WORD_DIGITS(N)) dut  (.clk, .rst_n, .start, .last);
  digit_ctrl #(.WORD_DIGITS(1)) dut1 (.clk, .rst_n, .start(start1), .last(last1));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      #1;
      checks += 3;
      if (start !== (t % N == 0))     begin failures++; $display("t=%0d start=%b", t, start); end
      if (last  !== (t % N == N - 1)) begin failures++; $display("t=%0d last=%b", t, last); end
      if (!(start1 && last1))         begin failures++; $display("t=%0d d=W framing", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
