// tb_aetr_top: end-to-end test of aetr_top at a reduced size (8 banks of
// 128 base row groups, 80-cycle refresh slots, 82,200-cycle windows) over six
// windows, so that the 256 ms round comes around twice. Stimulus and checks
// are in aetr_check_env.
module tb_aetr_top;
  import aetr_pkg::*;
  localparam int unsigned NB = 8, NG = 128, T_TICK = 80;
  localparam int unsigned T_WIN = T_TICK * (NB * NG + 1) + 120;

  logic clk = 0;
  always #1 clk = ~clk;

  logic rst_n, build_start, prof_valid, prof_ready, prof_short, build_busy, build_done;
  logic refresh_en, window_start, cmd_valid, cmd_refresh, deadline_miss;
  logic [1:0] round_idx;
  logic [2:0] cmd_bank;
  logic [6:0] cmd_group;
  logic [SIZE_W-1:0] cmd_size;
  logic [NB-1:0] ref_busy, acc_valid, acc_ready, acc_blocked;
  logic [31:0] n_cmd, n_refresh, n_ref_cycles;
  int checks, failures;
  bit finished;

  aetr_top #(.N_BANKS(NB), .GROUPS(NG), .T_WINDOW(T_WIN), .T_TICK(T_TICK)) dut (.*);

  aetr_check_env #(.N_BANKS(NB), .GROUPS(NG), .T_WINDOW(T_WIN), .T_TICK(T_TICK), .N_WIN(6)) env (.*);

  initial begin
    repeat (8 * T_WIN + 20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
