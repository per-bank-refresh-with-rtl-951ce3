// tb_aetr_refresh_controller: drives the refresh controller with its own
// window/slot timing, a flag memory holding a random merged-group layout per
// bank, and banks that are randomly occupied by accesses.
//
// Checked for every command: bank round-robin order (slots of finished banks
// are not used), group = next group start of that bank, size = decoded size,
// refresh/skip = retention bit OR 256 ms round, bank free at issue, ref_req
// held while waiting, and the bank busy for exactly T_FLAG (+ size *
// T_REF_BASE when refreshing) cycles. Per window: every bank visited each of
// its groups exactly once. Statistics counters against the model. A final
// window with too few slots must raise deadline_miss.
module tb_aetr_refresh_controller;
  import aetr_pkg::*;
  localparam int unsigned NB = 4, NG = 40, T_FLAG = 3, T_REF_BASE = 2;
  localparam int unsigned T_TICK = 20;
  localparam int unsigned T_WIN = T_TICK * (NB * NG + 1) + 50;
  localparam int unsigned N_WIN = 6;

  logic clk = 0, rst_n = 0;
  logic window_start = 0, tick = 0, long_round = 1;
  logic flag_rd_en;
  logic [1:0] flag_rd_bank;
  logic [5:0] flag_rd_group;
  flag_t flag_rd_data;
  logic [NB-1:0] ref_req, bank_free, ref_busy;
  logic cmd_valid, cmd_refresh;
  logic [1:0] cmd_bank;
  logic [5:0] cmd_group;
  logic [SIZE_W-1:0] cmd_size;
  logic [31:0] n_cmd, n_refresh, n_ref_cycles;
  logic deadline_miss;

  aetr_refresh_controller #(.N_BANKS(NB), .GROUPS(NG), .T_FLAG(T_FLAG), .T_REF_BASE(T_REF_BASE)) dut (
    .clk, .rst_n, .window_start, .tick, .long_round,
    .flag_rd_en, .flag_rd_bank, .flag_rd_group, .flag_rd_data,
    .ref_req, .bank_free, .ref_busy,
    .cmd_valid, .cmd_bank, .cmd_group, .cmd_size, .cmd_refresh,
    .n_cmd, .n_refresh, .n_ref_cycles, .deadline_miss);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sizes [8] = '{1, 2, 3, 4, 8, 16, 24, 32};
  logic [3:0] flags [NB][NG];
  int next_g [NB];      // model Refresh Counter
  int visits [NB];      // commands in this window
  int ngroups [NB];
  int busy_left [NB];   // expected remaining busy cycles
  int occ [NB];         // access occupancy of each bank
  int m_cmd = 0, m_ref = 0, m_cyc = 0;
  int skips = 0, refreshes = 0, long_refreshes = 0, waits = 0;
  int last_bank = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // flag memory: synchronous read, like the flag store
  always_ff @(posedge clk) if (flag_rd_en) flag_rd_data <= flag_t'(flags[flag_rd_bank][flag_rd_group]);

  // banks occupied by accesses; no new access while a refresh is requested
  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (occ[b] > 0) occ[b] <= occ[b] - 1;
      else if (!ref_req[b] && $urandom_range(0, 3) == 0) occ[b] <= $urandom_range(1, 12);
    end
  end
  always_comb for (int b = 0; b < NB; b++) bank_free[b] = (occ[b] == 0);

  // command checks
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (busy_left[b] > 0) begin
        check(ref_busy[b] && ref_req[b], "bank not busy during its refresh");
        busy_left[b]--;
      end else begin
        check(!ref_busy[b], "bank busy after its refresh");
      end
      if (ref_req[b] && !ref_busy[b] && !bank_free[b]) waits++;
    end
    if (cmd_valid) begin
      automatic int b = cmd_bank;
      automatic int code, sz, dur;
      automatic bit exp_ref;
      code = flags[b][next_g[b]] & 7;
      sz = sizes[code];
      exp_ref = flags[b][next_g[b]][3] || long_round;
      dur = T_FLAG + (exp_ref ? sz * T_REF_BASE : 0);
      check(bank_free[b], "command to a bank with an access in flight");
      check(int'(cmd_group) == next_g[b], $sformatf("bank %0d group %0d expected %0d", b, cmd_group, next_g[b]));
      check(int'(cmd_size) == sz, "command size");
      check(cmd_refresh == exp_ref, "refresh/skip decision");
      check(busy_left[b] == 0, "command to a bank still refreshing");
      busy_left[b] = dur;
      m_cmd++; m_ref += exp_ref; m_cyc += dur;
      if (exp_ref) begin
        refreshes++;
        if (!flags[b][next_g[b]][3]) long_refreshes++;
      end else skips++;
      next_g[b] += sz;
      visits[b]++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // random merged layout; bank 0 all size 1 (worst case for slots)
    for (int b = 0; b < NB; b++) begin
      automatic int g = 0;
      ngroups[b] = 0;
      while (g < NG) begin
        automatic int c;
        do c = (b == 0) ? 0 : $urandom_range(0, 7); while (g + sizes[c] > NG);
        flags[b][g] = {1'($urandom_range(0, 1)), 3'(c)};
        for (int k = 1; k < sizes[c]; k++) flags[b][g + k] = 4'($urandom);
        g += sizes[c];
        ngroups[b]++;
      end
      busy_left[b] = 0;
      occ[b] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < N_WIN + 1; w++) begin
      automatic int win = (w == N_WIN) ? T_TICK * 10 : T_WIN;   // last window: too short
      for (int b = 0; b < NB; b++) begin
        if (w > 0) check(visits[b] == ngroups[b], $sformatf("window %0d bank %0d: %0d visits, %0d groups", w, b, visits[b], ngroups[b]));
        visits[b] = 0;
        next_g[b] = 0;
      end
      @(negedge clk);
      long_round = (w % 4 == 0);
      for (int c = 0; c < win; c++) begin
        window_start = (c == 0);
        tick = (c % T_TICK == 0);
        @(negedge clk);
      end
    end
    window_start = 1; tick = 1;
    @(negedge clk);
    window_start = 0; tick = 0;
    @(negedge clk);
    check(deadline_miss, "deadline_miss not raised for a short window");
    check(int'(n_cmd) == m_cmd && int'(n_refresh) == m_ref && int'(n_ref_cycles) == m_cyc, "statistics");
    check(skips > 0 && refreshes > 0 && long_refreshes > 0 && waits > 0, "mechanisms");
    $display("cmds=%0d skips=%0d refreshes=%0d long_refreshes=%0d waits=%0d", m_cmd, skips, refreshes, long_refreshes, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // deadline_miss must stay low during the full-length windows
  always @(posedge clk) if (rst_n && !window_start && $time < 64'(10 * (T_WIN * N_WIN + 10)))
    check(!deadline_miss, "deadline_miss in a full window");
endmodule
