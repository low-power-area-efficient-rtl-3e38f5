// tb_ds_word_delay: self-checking test of the one-word delay.
//
// Feeds random digits and checks that each output digit equals the input
// digit exactly WORD_DIGITS (8) cycles earlier, and that the output is zero
// for the first WORD_DIGITS cycles after reset.
module tb_ds_word_delay;
  localparam int D  = 2;
  localparam int N  = 8;
  localparam int NC = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [D-1:0] din, dout;
  logic [D-1:0] hist [NC];

  ds_word_delay #(.D(D), .WORD_DIGITS(N)) dut (.clk, .rst_n, .din, .dout);

  initial begin
    logic [D-1:0] exp;
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NC; t++) begin
      @(negedge clk);
      din     = D'($urandom);
      hist[t] = din;
      #1;
      exp = (t >= N) ? hist[t-N] : '0;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("cycle %0d: got %h expected %h", t, dout, exp);
      end
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
