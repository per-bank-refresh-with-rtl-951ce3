// aetr_refresh_controller: per-bank refresh with adaptive early termination.
//
// At every refresh slot (tick) the controller takes the next bank in
// round-robin order. If that bank has not yet finished its round it reads
// the flag stored at the bank's Refresh Counter, i.e. at the first base row
// group of the bank's next row group. The retention bit decides what the
// command does:
//   ret_short = 1 (64 ms group)            -> refresh the whole row group
//   ret_short = 0 and a 256 ms round       -> refresh the whole row group
//   ret_short = 0 otherwise                -> early termination: only the
//                                             flag row is read (and thereby
//                                             refreshed), the rest is skipped
// Then the Refresh Counter is advanced by the group size. Only the addressed
// bank is blocked: the request goes to the bank gate, which stops new
// accesses to that bank, and the command is issued once the bank has no
// access in flight. The bank stays busy for T_FLAG cycles (flag row) plus
// T_REF_BASE cycles per refreshed base group.
// The flag semantics, the 64/256 ms classes and stepping by the group size
// are the document's. Round-robin slots, the busy-time model and the
// statistics counters are this design's choices.
//
// Interface: window_start/tick/long_round from the timer; flag read port to
// the flag store (rdata valid one cycle after rd_en); ref_req/bank_free with
// the bank gate; cmd_* describes each issued command for one cycle; ref_busy
// shows banks under refresh; n_cmd, n_refresh, n_ref_cycles count commands,
// commands that refreshed rows, and bank-busy cycles; deadline_miss is set
// if a bank had not finished its round when the next window began.
// Timing: tick -> flag read (1 cycle) -> decode (1 cycle) -> wait for the
// bank to be free -> cmd_valid. A tick that arrives while a command is
// being prepared is held and served next.
module aetr_refresh_controller
  import aetr_pkg::*;
#(
  parameter int unsigned N_BANKS    = 8,
  parameter int unsigned GROUPS     = 32768,
  parameter int unsigned T_FLAG     = 18,   // tRCD + tRP, 13 ns each at 667 MHz
  parameter int unsigned T_REF_BASE = 18,   // per refreshed base row group
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned AW = $clog2(GROUPS),
  localparam int unsigned DW = $clog2(T_FLAG + MAX_GROUP * T_REF_BASE + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // timer
  input  logic               window_start,
  input  logic               tick,
  input  logic               long_round,
  // flag store read port
  output logic               flag_rd_en,
  output logic [BW-1:0]      flag_rd_bank,
  output logic [AW-1:0]      flag_rd_group,
  input  flag_t              flag_rd_data,
  // bank gate
  output logic [N_BANKS-1:0] ref_req,
  input  logic [N_BANKS-1:0] bank_free,
  output logic [N_BANKS-1:0] ref_busy,
  // issued command
  output logic               cmd_valid,
  output logic [BW-1:0]      cmd_bank,
  output logic [AW-1:0]      cmd_group,
  output logic [SIZE_W-1:0]  cmd_size,
  output logic               cmd_refresh,
  // statistics
  output logic [31:0]        n_cmd,
  output logic [31:0]        n_refresh,
  output logic [31:0]        n_ref_cycles,
  output logic               deadline_miss
);

  typedef enum logic [1:0] {C_IDLE, C_READ, C_DECODE, C_WAIT} cstate_t;
  cstate_t state;

  logic [BW-1:0]      rr;          // next bank to get a slot
  logic [BW-1:0]      cur_bank;
  logic               tick_held;
  logic               started;     // a window has begun since enable
  logic               cur_short;
  logic [SIZE_W-1:0]  cur_size;
  logic [DW-1:0]      busy_cnt [N_BANKS];

  // per-bank Refresh Counters
  logic [AW-1:0]      rc_value [N_BANKS];
  logic [N_BANKS-1:0] rc_done;
  logic [N_BANKS-1:0] rc_adv;

  logic               dec_short;
  logic [SIZE_W-1:0]  dec_size;
  aetr_flag_decode u_dec (
    .flag      (flag_rd_data),
    .ret_short (dec_short),
    .size      (dec_size)
  );

  for (genvar b = 0; b < N_BANKS; b++) begin : g_rc
    aetr_refresh_counter #(.GROUPS(GROUPS)) u_rc (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (window_start),
      .advance (rc_adv[b]),
      .step    (cur_size),
      .value   (rc_value[b]),
      .done    (rc_done[b])
    );
  end

  logic slot, issue, do_refresh;
  logic [DW-1:0] duration;

  assign slot       = (tick || tick_held) && (state == C_IDLE) && !window_start;
  assign do_refresh = cur_short || long_round;
  assign duration   = do_refresh ? DW'(T_FLAG) + DW'(cur_size) * DW'(T_REF_BASE)
                                 : DW'(T_FLAG);
  assign issue      = (state == C_WAIT) && bank_free[cur_bank];

  assign flag_rd_en    = slot && !rc_done[rr];
  assign flag_rd_bank  = rr;
  assign flag_rd_group = rc_value[rr];

  always_comb begin
    rc_adv = '0;
    if (issue) rc_adv[cur_bank] = 1'b1;
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_busy
    assign ref_busy[b] = (busy_cnt[b] != '0);
    assign ref_req[b]  = ref_busy[b] ||
                         ((state == C_WAIT) && (cur_bank == BW'(b)));
  end

  assign cmd_valid   = issue;
  assign cmd_bank    = cur_bank;
  assign cmd_group   = rc_value[cur_bank];
  assign cmd_size    = cur_size;
  assign cmd_refresh = do_refresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      rr            <= '0;
      cur_bank      <= '0;
      tick_held     <= 1'b0;
      started       <= 1'b0;
      cur_short     <= 1'b0;
      cur_size      <= SIZE_W'(1);
      n_cmd         <= '0;
      n_refresh     <= '0;
      n_ref_cycles  <= '0;
      deadline_miss <= 1'b0;
      for (int b = 0; b < N_BANKS; b++) busy_cnt[b] <= '0;
    end else begin
      // busy counters
      for (int b = 0; b < N_BANKS; b++)
        if (busy_cnt[b] != '0) busy_cnt[b] <= busy_cnt[b] - 1'b1;

      if (window_start) begin
        started <= 1'b1;
        rr      <= '0;
        tick_held <= 1'b0;
        if (started && (rc_done != '1)) deadline_miss <= 1'b1;
      end else if (tick && (state != C_IDLE)) begin
        tick_held <= 1'b1;
      end

      unique case (state)
        C_IDLE: begin
          if (slot) begin
            tick_held <= 1'b0;
            rr        <= (rr == BW'(N_BANKS - 1)) ? '0 : rr + 1'b1;
            cur_bank  <= rr;
            if (!rc_done[rr]) state <= C_READ;
          end
        end
        C_READ: state <= C_DECODE;     // flag store output valid next cycle
        C_DECODE: begin
          cur_short <= dec_short;
          cur_size  <= dec_size;
          state     <= C_WAIT;
        end
        C_WAIT: begin
          if (issue) begin
            busy_cnt[cur_bank] <= duration;
            n_cmd        <= n_cmd + 1'b1;
            n_refresh    <= n_refresh + 32'(do_refresh);
            n_ref_cycles <= n_ref_cycles + 32'(duration);
            state        <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // A command is only issued to a bank with no access in flight.
  a_issue_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 cmd_valid |-> bank_free[cmd_bank]);

endmodule
