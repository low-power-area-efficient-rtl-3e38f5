// tb_fir_ds_top: end-to-end test of the digit-serial FIR filter at its
// default sizes (digit size 2, 8-bit samples, 16-bit words, taps 29, 43,
// 43, 29).
//
// A new random sample is offered whenever x_take is high; every y_valid
// output is compared with the direct-form sum computed from the samples
// taken so far. The test also checks the timing: x_take exactly every 8
// cycles, and each output valid exactly 8 cycles after its sample was
// taken. It counts how often the mechanisms of the digit-serial datapath
// occur and fails if any never does: a carry held between digits, a borrow
// held between digits in the subtractor, bits shifted past the top of a
// word being dropped at the next word start, a carry out of a word being
// dropped, and negative and positive outputs.
module tb_fir_ds_top;
  localparam int XW = 8, YW = 16, N = 8;
  localparam int NS = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [XW-1:0] x_in;
  logic          x_take, y_valid;
  logic [YW-1:0] y_out;

  fir_ds_top dut (.clk, .rst_n, .x_in, .x_take, .y_out, .y_valid);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters, sampled on the internal streams.
  int n_digit_carry = 0, n_digit_borrow = 0, n_shift_drop = 0, n_word_carry_drop = 0;
  int n_neg = 0, n_pos = 0;

  always @(negedge clk) if (rst_n) begin
    #2;
    if (!dut.start && dut.u_fir.u_mcm.u_add43.c_q) n_digit_carry++;
    if (!dut.start && !dut.u_fir.u_mcm.u_sub7.c_q) n_digit_borrow++;
    if (dut.start && dut.u_fir.u_mcm.u_sh8.g_shift.held_q != '0) n_shift_drop++;
    if (dut.last && dut.u_fir.g_tap[0].g_acc.u_add.c[2]) n_word_carry_drop++;
  end

  int samples [$];
  int take_cycle [$];
  int n_out = 0;

  // Stimulus: change x_in right after every edge; it is sampled whenever
  // x_take is high.
  initial begin
    int v;
    x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (samples.size() < NS) begin
      if (samples.size() < 6)       v = -128;
      else if (samples.size() < 12) v = 127;
      else                          v = int'(signed'(8'($urandom)));
      x_in = XW'(v);
      #1;
      if (x_take) begin
        if (take_cycle.size() > 0) begin
          checks++;
          if (cycle - take_cycle[$] != N) begin
            failures++;
            $display("x_take spacing %0d", cycle - take_cycle[$]);
          end
        end
        samples.push_back(v);
        take_cycle.push_back(cycle);
      end
      @(negedge clk);
    end
  end

  // Checker
  initial begin
    int exp, got, m;
    wait (rst_n);
    while (n_out < NS) begin
      @(negedge clk);
      #1;
      if (y_valid) begin
        m   = n_out;
        exp = 0;
        for (int k = 0; k < 4; k++)
          if (m - k >= 0)
            exp += ((k == 0 || k == 3) ? 29 : 43) * samples[m-k];
        got = int'($signed(y_out));
        checks += 2;
        if (got != exp) begin
          failures++;
          $display("output %0d: got %0d expected %0d", m, got, exp);
        end
        if (cycle - take_cycle[m] != N) begin
          failures++;
          $display("output %0d: latency %0d cycles, expected %0d", m, cycle - take_cycle[m], N);
        end
        if (got < 0) n_neg++;
        if (got > 0) n_pos++;
        n_out++;
      end
    end
    $display("mechanisms: digit_carry=%0d digit_borrow=%0d shift_drop=%0d word_carry_drop=%0d neg=%0d pos=%0d",
             n_digit_carry, n_digit_borrow, n_shift_drop, n_word_carry_drop, n_neg, n_pos);
    checks += 6;
    if (n_digit_carry == 0)     begin failures++; $display("no carry between digits seen"); end
    if (n_digit_borrow == 0)    begin failures++; $display("no borrow between digits seen"); end
    if (n_shift_drop == 0)      begin failures++; $display("no shifted-out bits dropped"); end
    if (n_word_carry_drop == 0) begin failures++; $display("no carry out of a word dropped"); end
    if (n_neg == 0)             begin failures++; $display("no negative output"); end
    if (n_pos == 0)             begin failures++; $display("no positive output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
