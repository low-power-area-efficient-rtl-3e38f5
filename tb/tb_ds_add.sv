// tb_ds_add: self-checking test of the digit-serial adder.
//
// Sends pairs of 16-bit words least significant digit first, with start on
// the first digit, and compares the reassembled sum digits with (a+b) mod
// 2^16 computed on whole words. Runs digit sizes 2 (default) and 4. Corner
// words force carries through every digit and a carry out of the word,
// which must not leak into the next word. The sum must appear in the same
// cycle as its operand digits (no latency).
module tb_ds_add;
  localparam int W  = 16;
  localparam int NW = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start;
  logic [1:0] a2, b2, s2;
  logic [3:0] a4, b4, s4;

  ds_add #(.D(2)) dut2 (.clk, .rst_n, .start, .a(a2), .b(b2), .s(s2));
  ds_add #(.D(4)) dut4 (.clk, .rst_n, .start, .a(a4), .b(b4), .s(s4));

  function automatic logic [W-1:0] pick(int w, int sel);
    case (w)
      0: return sel ? 16'h0001 : 16'hFFFF;
      1: return sel ? 16'hFFFF : 16'hFFFF;
      2: return sel ? 16'h5555 : 16'hAAAB;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    logic [W-1:0] wa, wb, g2, g4;
    start = 1'b0; a2 = '0; b2 = '0; a4 = '0; b4 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      wa = pick(w, 0);
      wb = pick(w, 1);
      // digit size 2 and 4 run side by side; the D=4 stream uses 4 cycles
      for (int k = 0; k < W / 2; k++) begin
        @(negedge clk);
        start = (k == 0);
        a2 = wa[k*2 +: 2]; b2 = wb[k*2 +: 2];
        a4 = (k < W / 4) ? wa[k*4 +: 4] : 4'(0);
        b4 = (k < W / 4) ? wb[k*4 +: 4] : 4'(0);
        #1;
        g2[k*2 +: 2] = s2;
        if (k < W / 4) g4[k*4 +: 4] = s4;
      end
      checks += 2;
      if (g2 !== W'(wa + wb)) begin
        failures++;
        $display("D=2 word %0d: %h+%h got %h", w, wa, wb, g2);
      end
      if (g4 !== W'(wa + wb)) begin
        failures++;
        $display("D=4 word %0d: %h+%h got %h", w, wa, wb, g4);
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
