// tb_mcm_29_43: self-checking test of the digit-serial MCM block.
//
// Streams 16-bit words with digit size 2 (default) and checks both outputs
// against 29*x and 43*x mod 2^16 computed on whole words. Inputs are
// random 16-bit words, sign-extended 8-bit samples (the filter's use) and
// the extremes. A second instance with digit size 1 (bit-serial) runs the
// same words. Products must come out digit for digit in the same cycle.
module tb_mcm_29_43;
  localparam int W  = 16;
  localparam int NW = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start2, start1;
  logic [1:0] x2, y29_2, y43_2;
  logic       x1, y29_1, y43_1;

  mcm_29_43 #(.D(2)) dut2 (.clk, .rst_n, .start(start2), .x(x2), .y29(y29_2), .y43(y43_2));
  mcm_29_43 #(.D(1)) dut1 (.clk, .rst_n, .start(start1), .x(x1), .y29(y29_1), .y43(y43_1));

  task automatic check(string name, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] wx, a29, a43, b29, b43;
    start2 = 1'b0; start1 = 1'b0; x2 = '0; x1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      case (w)
        0:       wx = 16'h0001;
        1:       wx = 16'hFFFF;
        2:       wx = 16'hFF80;
        3:       wx = 16'h007F;
        default: wx = (w % 2) ? W'($urandom) : W'(signed'(8'($urandom)));
      endcase
      // digit size 2: 8 cycles per word (the bit-serial instance idles)
      for (int k = 0; k < W / 2; k++) begin
        @(negedge clk);
        start2 = (k == 0);
        x2     = wx[k*2 +: 2];
        start1 = 1'b0;
        x1     = 1'b0;
        #1;
        a29[k*2 +: 2] = y29_2;
        a43[k*2 +: 2] = y43_2;
      end
      // digit size 1: 16 cycles per word (the d=2 instance idles)
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        start1 = (k == 0);
        x1     = wx[k];
        start2 = 1'b0;
        x2     = '0;
        #1;
        b29[k] = y29_1;
        b43[k] = y43_1;
      end
      check("29x d=2", a29, W'(29 * wx));
      check("43x d=2", a43, W'(43 * wx));
      check("29x d=1", b29, W'(29 * wx));
      check("43x d=1", b43, W'(43 * wx));
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
