// aetr_top: per-bank DRAM refresh with adaptive early termination (AETR).
//
// The design refreshes one bank at a time and skips the refresh of row
// groups whose cells all hold their data for 256 ms, while groups with a
// weak cell are refreshed every 64 ms. Adjacent base row groups with the
// same retention class are merged into larger groups (1, 2, 3, 4, 8, 16, 24
// or 32 base groups), so one flag check can skip many rows at once.
//
// Blocks:
//   aetr_flag_builder       retention profile stream -> merged groups, flags
//   aetr_flag_store         4-bit flag per base row group per bank
//   aetr_refresh_timer      64 ms windows, 256 ms rounds, refresh slots
//   aetr_refresh_controller round-robin per-bank refresh, Refresh Counters
//   aetr_bank_gate          blocks accesses only to the bank being refreshed
//
// Use: hold refresh_en low, pulse build_start and stream the profile
// (N_BANKS*GROUPS bits) until build_done; then raise refresh_en. The DRAM
// device and the access scheduler are outside: cmd_* is the refresh command
// to the device, acc_valid/acc_ready is the per-bank access handshake of the
// scheduler.
//
// Defaults: 8 banks; 8192 all-bank refresh commands per 64 ms, so 8192 per-
// bank groups per bank and 4 x 8192 = 32768 base groups per bank; a 667 MHz
// clock, so a 64 ms window is 42,688,000 cycles and a refresh slot is
// T_WINDOW / (N_BANKS*GROUPS + 1) = 162 cycles. T_FLAG, T_REF_BASE and
// T_ACCESS are this design's timing choices (see the sub-blocks).
module aetr_top
  import aetr_pkg::*;
#(
  parameter int unsigned N_BANKS     = 8,
  parameter int unsigned GROUPS      = 32768,
  parameter int unsigned T_WINDOW    = 42_688_000,
  parameter int unsigned T_TICK      = T_WINDOW / (N_BANKS * GROUPS + 1),
  parameter int unsigned LONG_ROUNDS = 4,
  parameter int unsigned T_FLAG      = 18,
  parameter int unsigned T_REF_BASE  = 18,
  parameter int unsigned T_ACCESS    = 27,
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned AW = $clog2(GROUPS),
  localparam int unsigned RW = (LONG_ROUNDS > 1) ? $clog2(LONG_ROUNDS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // retention profile and flag build
  input  logic               build_start,
  input  logic               prof_valid,
  output logic               prof_ready,
  input  logic               prof_short,
  output logic               build_busy,
  output logic               build_done,
  // refresh
  input  logic               refresh_en,
  output logic               window_start,
  output logic [RW-1:0]      round_idx,
  output logic               cmd_valid,
  output logic [BW-1:0]      cmd_bank,
  output logic [AW-1:0]      cmd_group,
  output logic [SIZE_W-1:0]  cmd_size,
  output logic               cmd_refresh,
  output logic [N_BANKS-1:0] ref_busy,
  // per-bank accesses
  input  logic [N_BANKS-1:0] acc_valid,
  output logic [N_BANKS-1:0] acc_ready,
  output logic [N_BANKS-1:0] acc_blocked,
  // statistics
  output logic [31:0]        n_cmd,
  output logic [31:0]        n_refresh,
  output logic [31:0]        n_ref_cycles,
  output logic               deadline_miss
);

  logic          wr_en;
  logic [BW-1:0] wr_bank;
  logic [AW-1:0] wr_group;
  flag_t         wr_flag;

  logic          rd_en;
  logic [BW-1:0] rd_bank;
  logic [AW-1:0] rd_group;
  flag_t         rd_flag;

  logic          tick, long_round;
  logic [N_BANKS-1:0] ref_req, bank_free;

  aetr_flag_builder #(.N_BANKS(N_BANKS), .GROUPS(GROUPS)) u_builder (
    .clk, .rst_n,
    .start      (build_start),
    .prof_valid, .prof_ready, .prof_short,
    .busy       (build_busy),
    .done       (build_done),
    .wr_en, .wr_bank, .wr_group, .wr_flag
  );

  aetr_flag_store #(.N_BANKS(N_BANKS), .GROUPS(GROUPS)) u_store (
    .clk,
    .we (wr_en), .wbank (wr_bank), .wgroup (wr_group), .wdata (wr_flag),
    .re (rd_en), .rbank (rd_bank), .rgroup (rd_group), .rdata (rd_flag)
  );

  aetr_refresh_timer #(.T_WINDOW(T_WINDOW), .T_TICK(T_TICK),
                       .LONG_ROUNDS(LONG_ROUNDS)) u_timer (
    .clk, .rst_n,
    .en (refresh_en),
    .window_start, .tick, .round_idx, .long_round
  );

  aetr_refresh_controller #(.N_BANKS(N_BANKS), .GROUPS(GROUPS),
                            .T_FLAG(T_FLAG), .T_REF_BASE(T_REF_BASE)) u_ctrl (
    .clk, .rst_n,
    .window_start, .tick, .long_round,
    .flag_rd_en    (rd_en),
    .flag_rd_bank  (rd_bank),
    .flag_rd_group (rd_group),
    .flag_rd_data  (rd_flag),
    .ref_req, .bank_free, .ref_busy,
    .cmd_valid, .cmd_bank, .cmd_group, .cmd_size, .cmd_refresh,
    .n_cmd, .n_refresh, .n_ref_cycles, .deadline_miss
  );

  aetr_bank_gate #(.N_BANKS(N_BANKS), .T_ACCESS(T_ACCESS)) u_gate (
    .clk, .rst_n,
    .acc_valid, .acc_ready, .ref_req, .bank_free, .acc_blocked
  );

endmodule
