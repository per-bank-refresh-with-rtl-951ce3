// tb_aetr_refresh_counter: random advances of the Refresh Counter against a
// reference model, including wrap at the end of the bank, done, clear and
// advances ignored while done.
module tb_aetr_refresh_counter;
  import aetr_pkg::*;
  localparam int unsigned GROUPS = 100;
  localparam int unsigned AW = $clog2(GROUPS);

  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [SIZE_W-1:0] step = 1;
  logic [AW-1:0] value;
  logic done;
  int checks = 0, failures = 0;
  int m_value = 0, m_done = 0, wraps = 0;
  int sizes [8] = '{1, 2, 3, 4, 8, 16, 24, 32};

  aetr_refresh_counter #(.GROUPS(GROUPS)) dut (.clk, .rst_n, .clear, .advance, .step, .value, .done);

  always #5 clk = ~clk;

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
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear   = ($urandom_range(0, 40) == 0);
      advance = ($urandom_range(0, 2) != 0);
      step    = SIZE_W'(sizes[$urandom_range(0, 7)]);
      @(posedge clk);
      if (clear) begin
        m_value = 0; m_done = 0;
      end else if (advance && !m_done) begin
        if (m_value + int'(step) >= GROUPS) begin
          m_value = 0; m_done = 1; wraps++;
        end else m_value += int'(step);
      end
      #1;
      checks++;
      if (int'(value) != m_value || int'(done) != m_done) begin
        failures++;
        $display("cycle %0d: value %0d done %0d, expected %0d %0d", i, value, done, m_value, m_done);
      end
    end
    checks++;
    if (wraps < 5) begin
      failures++;
      $display("too few wraps: %0d", wraps);
    end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
