// tb_aetr_refresh_timer: checks window length, slot spacing, the round
// sequence and the 256 ms (long) round, and that en low restarts the timer.
module tb_aetr_refresh_timer;
  localparam int unsigned T_WINDOW = 53, T_TICK = 7, LONG_ROUNDS = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic window_start, tick, long_round;
  logic [1:0] round_idx;
  int checks = 0, failures = 0;
  int cyc = 0;        // cycles since en rose
  int windows = 0;

  aetr_refresh_timer #(.T_WINDOW(T_WINDOW), .T_TICK(T_TICK), .LONG_ROUNDS(LONG_ROUNDS)) dut (
    .clk, .rst_n, .en, .window_start, .tick, .round_idx, .long_round);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      check(!window_start && !tick, "pulse while disabled");
    end
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      en = 1;
      cyc = 0;
      for (int i = 0; i < 9 * T_WINDOW; i++) begin
        #1;
        begin
          automatic int pos = cyc % T_WINDOW;
          automatic int rnd = (cyc / T_WINDOW) % LONG_ROUNDS;
          check(window_start == (pos == 0), "window_start position");
          check(tick == (pos % T_TICK == 0), "tick position");
          check(int'(round_idx) == rnd, "round index");
          check(long_round == (rnd == 0), "long round");
          if (window_start) windows++;
        end
        @(negedge clk);
        cyc++;
      end
      en = 0;
      repeat (3) @(negedge clk);
    end
    check(windows == 18, "window count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
