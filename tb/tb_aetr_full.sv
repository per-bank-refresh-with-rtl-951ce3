// tb_aetr_full: aetr_top at its default size (8 banks x 32768 base row
// groups, 42,688,000-cycle windows = 64 ms at 667 MHz, 162-cycle refresh
// slots). Builds the flags from a random profile of 262,144 base groups and
// runs eight windows, 512 ms, in which the 256 ms round comes twice, with the
// checks of aetr_check_env. At the end it prints the refresh overhead over
// the 512 ms: commands issued, commands that refreshed rows, total refresh
// busy cycles and the average busy cycles per command.
module tb_aetr_full;
  import aetr_pkg::*;
  localparam int unsigned NB = 8, NG = 32768, T_WIN = 42_688_000;
  localparam int unsigned T_TICK = T_WIN / (NB * NG + 1);

  logic clk = 0;
  always #1 clk = ~clk;

  logic rst_n, build_start, prof_valid, prof_ready, prof_short, build_busy, build_done;
  logic refresh_en, window_start, cmd_valid, cmd_refresh, deadline_miss;
  logic [1:0] round_idx;
  logic [2:0] cmd_bank;
  logic [14:0] cmd_group;
  logic [SIZE_W-1:0] cmd_size;
  logic [NB-1:0] ref_busy, acc_valid, acc_ready, acc_blocked;
  logic [31:0] n_cmd, n_refresh, n_ref_cycles;
  int checks, failures;
  bit finished;

  aetr_top dut (.*);

  aetr_check_env #(.N_BANKS(NB), .GROUPS(NG), .T_WINDOW(T_WIN), .T_TICK(T_TICK),
                   .N_WIN(8), .MAX_LONG_RUN(300)) env (.*);

  initial begin
    repeat (9 * T_WIN) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (finished) begin
    $display("512 ms: issued commands %0d, refreshing commands %0d, refresh cycles %0d, average cycles per command %0.2f",
             n_cmd, n_refresh, n_ref_cycles, real'(n_ref_cycles) / real'(n_cmd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
