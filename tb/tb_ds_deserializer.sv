// tb_ds_deserializer: self-checking test of the serial-to-parallel converter.
//
// Sends random 16-bit words as 2-bit digits, LSB first, with last on the
// eighth digit. y_valid must be high exactly in the cycle after each last
// digit, with y_out equal to the word; y_out must hold between words.
module tb_ds_deserializer;
  localparam int D = 2, YW = 16, N = YW / D;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          last, y_valid;
  logic [D-1:0]  digit;
  logic [YW-1:0] y_out;

  ds_deserializer #(.D(D), .YW(YW)) dut (.clk, .rst_n, .last, .digit, .y_out, .y_valid);

  initial begin
    logic [YW-1:0] w_cur, w_prev;
    last = 1'b0; digit = '0; w_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      w_cur = YW'($urandom);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        last  = (k == N - 1);
        digit = w_cur[k*D +: D];
        #1;
        // outputs here reflect the word before: valid only right after it
        checks += 2;
        if (y_valid !== (k == 0 && w > 0)) begin
          failures++; $display("word %0d digit %0d: y_valid=%b", w, k, y_valid);
        end
        if (y_out !== w_prev) begin
          failures++; $display("word %0d digit %0d: y_out=%h expected %h", w, k, y_out, w_prev);
        end
      end
      w_prev = w_cur;
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
