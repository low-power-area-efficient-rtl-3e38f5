// tb_ds_serializer: self-checking test of the parallel-to-serial converter.
//
// Presents a new random 8-bit sample at each word start (every 8 cycles)
// and checks each outgoing 2-bit digit against the sign-extended 16-bit
// word, digit 0 in the start cycle itself. x_in is scrambled between word
// starts to show that only the start-cycle value is used.
module tb_ds_serializer;
  localparam int D = 2, XW = 8, YW = 16, N = YW / D;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          start;
  logic [XW-1:0] x_in;
  logic [D-1:0]  digit;

  ds_serializer #(.D(D), .XW(XW), .YW(YW)) dut (.clk, .rst_n, .start, .x_in, .digit);

  initial begin
    logic [YW-1:0] ext;
    start = 1'b0; x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        start = (k == 0);
        if (k == 0) begin
          x_in = (w == 0) ? 8'h80 : (w == 1) ? 8'h7F : XW'($urandom);
          ext  = YW'(signed'(x_in));
        end else begin
          x_in = XW'($urandom);
        end
        #1;
        checks++;
        if (digit !== ext[k*D +: D]) begin
          failures++;
          $display("word %0d digit %0d: got %b expected %b", w, k, digit, ext[k*D +: D]);
        end
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
