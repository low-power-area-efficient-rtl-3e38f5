// tb_ds_lshift: self-checking test of the digit-serial left shift.
//
// Streams random 16-bit words with digit size 2 through shifters of 1, 2, 3
// and 5 bit positions and compares each reassembled word with
// (word << S) mod 2^16. Consecutive words are sent back to back, so bits
// shifted out of one word must be dropped rather than appear in the next.
module tb_ds_lshift;
  localparam int W  = 16;
  localparam int D  = 2;
  localparam int NW = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start;
  logic [D-1:0] din, o1, o2, o3, o5;

  ds_lshift #(.D(D), .S(1)) u1 (.clk, .rst_n, .start, .din, .dout(o1));
  ds_lshift #(.D(D), .S(2)) u2 (.clk, .rst_n, .start, .din, .dout(o2));
  ds_lshift #(.D(D), .S(3)) u3 (.clk, .rst_n, .start, .din, .dout(o3));
  ds_lshift #(.D(D), .S(5)) u5 (.clk, .rst_n, .start, .din, .dout(o5));

  task automatic check(string name, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] wx, g1, g2, g3, g5;
    start = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      wx = (w == 0) ? 16'hFFFF : W'($urandom);
      for (int k = 0; k < W / D; k++) begin
        @(negedge clk);
        start = (k == 0);
        din   = wx[k*D +: D];
        #1;
        g1[k*D +: D] = o1; g2[k*D +: D] = o2;
        g3[k*D +: D] = o3; g5[k*D +: D] = o5;
      end
      check("S=1", g1, wx << 1);
      check("S=2", g2, wx << 2);
      check("S=3", g3, wx << 3);
      check("S=5", g5, wx << 5);
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
