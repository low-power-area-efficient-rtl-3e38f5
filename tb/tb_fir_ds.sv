// tb_fir_ds: self-checking test of the digit-serial transposed-form FIR.
//
// Four filters with taps 29, 43, 43, 29 and 16-bit words run side by side
// at digit sizes 1 (bit-serial), 2 (default), 4 and 16 (bit-parallel, one
// word per cycle). Each gets its own random stream of sign-extended 8-bit
// samples, including the most negative and most positive values in runs,
// and every output word is compared with the direct-form sum
// 29x[n] + 43x[n-1] + 43x[n-2] + 29x[n-3] (zero history after reset).
// Output digits must appear in the same cycle as the input digits.
module tb_fir_ds;
  localparam int W  = 16;
  localparam int NS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  localparam int DS [4] = '{1, 2, 4, 16};

  for (genvar g = 0; g < 4; g++) begin : g_d
    localparam int D = DS[g];
    logic         start;
    logic [D-1:0] x, y;

    fir_ds #(.D(D), .YW(W)) dut (.clk, .rst_n, .start, .x, .y);

    initial begin
      int            hist [4];
      logic [W-1:0]  wx, got, exp;
      int            v;
      start = 1'b0; x = '0;
      hist = '{0, 0, 0, 0};
      wait (rst_n);
      for (int n = 0; n < NS; n++) begin
        if (n < 8)       v = -128;
        else if (n < 16) v = 127;
        else             v = int'(signed'(8'($urandom)));
        for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = v;
        wx  = W'(v);
        exp = W'(29 * hist[0] + 43 * hist[1] + 43 * hist[2] + 29 * hist[3]);
        for (int k = 0; k < W / D; k++) begin
          @(negedge clk);
          start = (k == 0);
          x     = wx[k*D +: D];
          #1;
          got[k*D +: D] = y;
        end
        checks++;
        if (got !== exp) begin
          failures++;
          $display("D=%0d sample %0d: got %0d expected %0d", D, n,
                   $signed(got), $signed(exp));
        end
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 4);
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
