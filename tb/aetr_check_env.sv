// aetr_check_env: stimulus and checker for the whole AETR refresh design.
//
// Drives aetr_top through one complete operation and checks it against a
// model that is independent of the RTL:
//  1. A random retention profile is generated (mostly long-retention runs,
//     rare short is_weak runs, plus one copy of the worked example pattern
//     0 x11, 1, 0 x4 at the start of bank 0) and streamed in with gaps.
//  2. The expected merged groups of every bank are computed: from each group
//     start take the largest allowed size not above the run of equal bits
//     (at most 32, never past the bank end).
//  3. Refresh is enabled for N_WIN windows while random accesses hit all
//     banks. Every refresh command must match the model's next group of its
//     bank, its size, and refresh = is_weak OR 256 ms round. Every base row
//     group must be refreshed within 1 window (is_weak) or 4 windows (long)
//     plus one slot, and every flag row within 1 window plus one slot.
//  4. Statistics outputs must match the commands seen.
// Mechanisms counted, each must occur: skip, refresh of a 64 ms group,
// refresh of a 256 ms group in a long round, every one of the 8 sizes,
// round completion, an access accepted while another bank refreshes, an
// access held back by a refresh of its own bank.
module aetr_check_env
  import aetr_pkg::*;
#(
  parameter int unsigned N_BANKS  = 8,
  parameter int unsigned GROUPS   = 128,
  parameter int unsigned T_WINDOW = 100000,
  parameter int unsigned T_TICK   = 80,
  parameter int unsigned N_WIN    = 6,
  parameter int unsigned MAX_LONG_RUN = 60,
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned AW = $clog2(GROUPS)
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               build_start,
  output logic               prof_valid,
  input  logic               prof_ready,
  output logic               prof_short,
  input  logic               build_busy,
  input  logic               build_done,
  output logic               refresh_en,
  input  logic               window_start,
  input  logic [1:0]         round_idx,
  input  logic               cmd_valid,
  input  logic [BW-1:0]      cmd_bank,
  input  logic [AW-1:0]      cmd_group,
  input  logic [SIZE_W-1:0]  cmd_size,
  input  logic               cmd_refresh,
  input  logic [N_BANKS-1:0] ref_busy,
  output logic [N_BANKS-1:0] acc_valid,
  input  logic [N_BANKS-1:0] acc_ready,
  input  logic [N_BANKS-1:0] acc_blocked,
  input  logic [31:0]        n_cmd,
  input  logic [31:0]        n_refresh,
  input  logic [31:0]        n_ref_cycles,
  input  logic               deadline_miss,
  output int                 checks,
  output int                 failures,
  output bit                 finished
);

  int sizes [8] = '{1, 2, 3, 4, 8, 16, 24, 32};
  bit  prof   [N_BANKS][GROUPS];
  byte code_at [N_BANKS][GROUPS];   // model: size code at a group start, -1 elsewhere
  longint last_ref  [N_BANKS][GROUPS];
  longint last_flag [N_BANKS][GROUPS];
  int  next_g [N_BANKS];
  int  model_groups = 0;
  longint cyc = 0;
  bit  running = 0;
  bit  seen_window = 0;
  int  n_fail_print = 0;

  // mechanism counters
  int m_skip = 0, m_ref_short = 0, m_ref_long = 0, m_rounds = 0;
  int m_parallel = 0, m_blocked = 0, m_cmds = 0, m_refreshes = 0;
  int m_size [8];
  longint m_cycles_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (n_fail_print < 20) $display("cycle %0d: %s", cyc, what);
      n_fail_print++;
    end
  endtask

  function automatic int largest_allowed(int len);
    int best = 1;
    foreach (sizes[i]) if (sizes[i] <= len) best = sizes[i];
    return best;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // ---- accesses: each bank holds a request until it is accepted ----
  always @(posedge clk) if (running) begin
    for (int b = 0; b < N_BANKS; b++) begin
      if (acc_valid[b] && acc_ready[b]) begin
        if (ref_busy != '0 && !ref_busy[b]) m_parallel++;
        acc_valid[b] <= ($urandom_range(0, 3) == 0);
      end else if (!acc_valid[b]) begin
        acc_valid[b] <= ($urandom_range(0, 3) == 0);
      end
      if (acc_blocked[b]) m_blocked++;
    end
  end

  // ---- refresh command checks ----
  always @(posedge clk) if (running) begin
    if (window_start) begin
      foreach (next_g[b]) begin
        if (seen_window)
          check(next_g[b] >= int'(GROUPS), $sformatf("bank %0d round not finished", b));
        next_g[b] = 0;
      end
      if (seen_window) m_rounds++;
      seen_window = 1;
    end
    check(!deadline_miss, "deadline_miss raised");
    if (cmd_valid) begin
      automatic int b = cmd_bank;
      automatic int g = next_g[b];
      automatic int c, sz;
      automatic bit is_weak, exp_ref;
      if (g >= int'(GROUPS)) begin
        check(0, $sformatf("bank %0d command after its round ended", b));
      end else begin
        c = code_at[b][g];
        sz = sizes[c];
        is_weak = prof[b][g];
        exp_ref = is_weak || (round_idx == 2'd0);
        check(int'(cmd_group) == g, $sformatf("bank %0d group %0d, expected %0d", b, cmd_group, g));
        check(int'(cmd_size) == sz, $sformatf("bank %0d group %0d size %0d, expected %0d", b, g, cmd_size, sz));
        check(cmd_refresh == exp_ref, $sformatf("bank %0d group %0d refresh %b", b, g, cmd_refresh));
        // flag row is read, hence refreshed, by every command
        check(cyc - last_flag[b][g] <= longint'(T_WINDOW + T_TICK), $sformatf("flag row %0d/%0d late", b, g));
        last_flag[b][g] = cyc;
        if (cmd_refresh) begin
          for (int k = 0; k < sz && g + k < int'(GROUPS); k++) begin
            automatic longint lim = (prof[b][g + k] ? 1 : 4) * longint'(T_WINDOW) + T_TICK;
            check(cyc - last_ref[b][g + k] <= lim, $sformatf("group %0d/%0d refreshed late", b, g + k));
            last_ref[b][g + k] = cyc;
          end
          m_refreshes++;
          if (is_weak) m_ref_short++; else m_ref_long++;
        end else begin
          m_skip++;
        end
        m_size[c]++;
        m_cmds++;
        next_g[b] = g + sz;
      end
    end
  end

  initial begin
    automatic longint t0;
    rst_n = 0; build_start = 0; prof_valid = 0; prof_short = 0; refresh_en = 0;
    acc_valid = '0; checks = 0; failures = 0; finished = 0;
    // profile
    for (int b = 0; b < N_BANKS; b++) begin
      automatic int g = 0;
      while (g < int'(GROUPS)) begin
        automatic bit v = ($urandom_range(0, 5) == 0);
        automatic int len = v ? $urandom_range(1, 3) : $urandom_range(1, MAX_LONG_RUN);
        for (int k = 0; k < len && g < int'(GROUPS); k++) prof[b][g++] = v;
      end
    end
    if (GROUPS >= 16) begin
      for (int g = 0; g < 16; g++) prof[0][g] = (g == 11);
      if (GROUPS > 16) prof[0][16] = 1;
    end
    // model of the merged groups
    for (int b = 0; b < N_BANKS; b++) begin
      automatic int g = 0;
      for (int i = 0; i < int'(GROUPS); i++) code_at[b][i] = -1;
      while (g < int'(GROUPS)) begin
        automatic int len = 1, s;
        while (g + len < int'(GROUPS) && len < 32 && prof[b][g + len] == prof[b][g]) len++;
        s = largest_allowed(len);
        foreach (sizes[i]) if (sizes[i] == s) code_at[b][g] = byte'(i);
        model_groups++;
        g += s;
      end
    end
    if (GROUPS >= 16) begin
      check(code_at[0][0] == 4 && code_at[0][8] == 2 && code_at[0][11] == 0 && code_at[0][12] == 3,
            "model of the worked example");
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) build_start = 1;
    @(negedge clk) build_start = 0;
    check(build_busy, "builder not busy after start");
    for (int b = 0; b < N_BANKS; b++)
      for (int g = 0; g < int'(GROUPS); g++) begin
        prof_valid = ($urandom_range(0, 7) != 0);
        while (!prof_valid) begin
          @(negedge clk);
          prof_valid = ($urandom_range(0, 7) != 0);
        end
        prof_short = prof[b][g];
        @(posedge clk);
        while (!prof_ready) @(posedge clk);
        @(negedge clk);
      end
    prof_valid = 0;
    while (!build_done) @(negedge clk);
    $display("flags built at cycle %0d: %0d merged groups for %0d base groups",
             cyc, model_groups, N_BANKS * GROUPS);
    // refresh
    t0 = cyc + 1;
    for (int b = 0; b < N_BANKS; b++)
      for (int g = 0; g < int'(GROUPS); g++) begin
        last_ref[b][g] = t0;
        last_flag[b][g] = t0;
      end
    refresh_en = 1;
    running = 1;
    repeat (int'(N_WIN) * int'(T_WINDOW)) @(negedge clk);
    // every group and flag row must still be within its limit
    for (int b = 0; b < N_BANKS; b++)
      for (int g = 0; g < int'(GROUPS); g++) begin
        automatic longint lim = (prof[b][g] ? 1 : 4) * longint'(T_WINDOW) + T_TICK;
        check(cyc - last_ref[b][g] <= lim, $sformatf("group %0d/%0d not refreshed in time", b, g));
        if (code_at[b][g] >= 0)
          check(cyc - last_flag[b][g] <= longint'(T_WINDOW + T_TICK), $sformatf("flag row %0d/%0d not read", b, g));
      end
    @(negedge clk);
    check(int'(n_cmd) == m_cmds, $sformatf("n_cmd %0d, seen %0d", n_cmd, m_cmds));
    check(int'(n_refresh) == m_refreshes, $sformatf("n_refresh %0d, seen %0d", n_refresh, m_refreshes));
    check(m_cmds >= (int'(N_WIN) - 1) * model_groups, "too few commands");
    // mechanisms
    check(m_skip > 0, "no skipped group");
    check(m_ref_short > 0, "no 64 ms group refreshed");
    check(m_ref_long > 0, "no 256 ms group refreshed");
    check(m_rounds >= int'(N_WIN) - 1, "rounds completed");
    check(m_parallel > 0, "no access served during another bank's refresh");
    check(m_blocked > 0, "no access held back by a refresh");
    foreach (m_size[i]) check(m_size[i] > 0, $sformatf("size %0d never used", sizes[i]));
    $display("commands=%0d (per window %0d) refreshes=%0d skips=%0d short=%0d long=%0d",
             m_cmds, model_groups, m_refreshes, m_skip, m_ref_short, m_ref_long);
    $display("rounds=%0d parallel_accesses=%0d blocked_accesses=%0d refresh_cycles=%0d",
             m_rounds, m_parallel, m_blocked, n_ref_cycles);
    $display("sizes used: 1:%0d 2:%0d 3:%0d 4:%0d 8:%0d 16:%0d 24:%0d 32:%0d",
             m_size[0], m_size[1], m_size[2], m_size[3], m_size[4], m_size[5], m_size[6], m_size[7]);
    finished = 1;
  end
endmodule
