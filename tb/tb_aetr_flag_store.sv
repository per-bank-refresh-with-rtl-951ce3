// tb_aetr_flag_store: random writes and synchronous reads against a model
// array, including a read and a write of the same entry in one cycle (the
// read returns the old value).
module tb_aetr_flag_store;
  import aetr_pkg::*;
  localparam int unsigned N_BANKS = 3, GROUPS = 20;

  logic clk = 0, we = 0, re = 0;
  logic [1:0] wbank = 0, rbank = 0;
  logic [4:0] wgroup = 0, rgroup = 0;
  flag_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [3:0] model [N_BANKS][GROUPS];
  logic [3:0] expected;
  bit exp_valid = 0;

  aetr_flag_store #(.N_BANKS(N_BANKS), .GROUPS(GROUPS)) dut (
    .clk, .we, .wbank, .wgroup, .wdata, .re, .rbank, .rgroup, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry
    for (int b = 0; b < N_BANKS; b++)
      for (int g = 0; g < GROUPS; g++) begin
        @(negedge clk);
        we = 1; wbank = 2'(b); wgroup = 5'(g); wdata = flag_t'(4'($urandom));
        model[b][g] = wdata;
      end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== expected) begin
          failures++;
          $display("read %0d: got %h expected %h", i, rdata, expected);
        end
      end
      we = $urandom_range(0, 1);
      re = $urandom_range(0, 1);
      wbank = 2'($urandom_range(0, N_BANKS - 1)); wgroup = 5'($urandom_range(0, GROUPS - 1));
      rbank = ($urandom_range(0, 3) == 0) ? wbank : 2'($urandom_range(0, N_BANKS - 1));
      rgroup = ($urandom_range(0, 3) == 0) ? wgroup : 5'($urandom_range(0, GROUPS - 1));
      wdata = flag_t'(4'($urandom));
      if (re) begin
        expected = model[rbank][rgroup];
        exp_valid = 1;
      end
      if (we) model[wbank][wgroup] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
