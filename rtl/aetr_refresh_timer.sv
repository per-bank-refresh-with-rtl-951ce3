// aetr_refresh_timer: refresh window, round and slot timing for AETR.
//
// A window counter runs over T_WINDOW clock cycles (64 ms at the 667 MHz
// DRAM bus clock by default). window_start pulses in the first cycle of each
// window. round_idx counts windows modulo LONG_ROUNDS (4, because the long
// retention class is 256 ms = 4 x 64 ms); long_round is high in the window
// where round_idx is 0, the window in which 256 ms groups are refreshed.
// tick pulses every T_TICK cycles from the start of a window: it is the slot
// at which the refresh controller may handle one row group of one bank. The
// default T_TICK gives every base row group of every bank one slot per
// window, so a round always completes, whatever the group sizes.
// The 64/256 ms periods are the document's; the slot pacing is this design's.
//
// Interface: en in (low holds the timer at the start of round 0);
// window_start, tick, round_idx and long_round out.
// Timing: outputs are registered-state decodes, valid in the same cycle.
module aetr_refresh_timer #(
  parameter int unsigned T_WINDOW    = 42_688_000,  // 64 ms at 667 MHz
  parameter int unsigned T_TICK      = 162,         // cycles per refresh slot
  parameter int unsigned LONG_ROUNDS = 4,           // 256 ms / 64 ms
  localparam int unsigned WW = $clog2(T_WINDOW),
  localparam int unsigned TW = (T_TICK > 1) ? $clog2(T_TICK) : 1,
  localparam int unsigned RW = (LONG_ROUNDS > 1) ? $clog2(LONG_ROUNDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          window_start,
  output logic          tick,
  output logic [RW-1:0] round_idx,
  output logic          long_round
);

  logic [WW-1:0] wcnt;
  logic [TW-1:0] tcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      tcnt      <= '0;
      round_idx <= '0;
    end else if (!en) begin
      wcnt      <= '0;
      tcnt      <= '0;
      round_idx <= '0;
    end else begin
      if (wcnt == WW'(T_WINDOW - 1)) begin
        wcnt <= '0;
        tcnt <= '0;
        round_idx <= (round_idx == RW'(LONG_ROUNDS - 1)) ? '0 : round_idx + 1'b1;
      end else begin
        wcnt <= wcnt + 1'b1;
        tcnt <= (tcnt == TW'(T_TICK - 1)) ? '0 : tcnt + 1'b1;
      end
    end
  end

  assign window_start = en && (wcnt == '0);
  assign tick         = en && (tcnt == '0);
  assign long_round   = (round_idx == '0);

endmodule
