// tb_aetr_flag_builder: checks the row-group merge and the flags written.
//
// Part 1 runs the worked example of the scheme on one bank of 16 base
// groups: groups 0..10 long-retention, group 11 weak, 12..15 long. The
// expected flags are 0_100 at 0 (size 8), 0_010 at 8 (size 3), 1_000 at 11
// (size 1) and 0_011 at 12 (size 4).
// Part 2 streams random profiles with long runs (so that all eight sizes
// occur) into 3 banks of 100 groups, with gaps in prof_valid, and compares
// every write with a reference that walks each bank from group 0 and, at
// each group start, takes the largest allowed size not above the number of
// following equal-retention groups (capped at 32 and at the bank end).
module tb_aetr_flag_builder;
  import aetr_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int sizes [8] = '{1, 2, 3, 4, 8, 16, 24, 32};
  int size_seen [8];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part 1: the worked example ----------------
  logic a_start = 0, a_valid = 0, a_ready, a_short = 0, a_busy, a_done, a_we;
  logic [0:0] a_bank;
  logic [3:0] a_group;
  flag_t a_flag;
  aetr_flag_builder #(.N_BANKS(1), .GROUPS(16)) dut_a (
    .clk, .rst_n, .start(a_start), .prof_valid(a_valid), .prof_ready(a_ready),
    .prof_short(a_short), .busy(a_busy), .done(a_done), .wr_en(a_we),
    .wr_bank(a_bank), .wr_group(a_group), .wr_flag(a_flag));

  int a_n = 0;
  int a_exp_g [4] = '{0, 8, 11, 12};
  logic [3:0] a_exp_f [4] = '{4'b0100, 4'b0010, 4'b1000, 4'b0011};
  always @(posedge clk) if (rst_n && a_we) begin
    checks++;
    if (a_n >= 4 || int'(a_group) != a_exp_g[a_n] || a_flag != a_exp_f[a_n]) begin
      failures++;
      $display("example write %0d: group %0d flag %b", a_n, a_group, a_flag);
    end
    a_n++;
  end

  // ---------------- part 2: random profiles ----------------
  localparam int unsigned NB = 3, NG = 100;
  logic b_start = 0, b_valid = 0, b_ready, b_short = 0, b_busy, b_done, b_we;
  logic [1:0] b_bank;
  logic [6:0] b_group;
  flag_t b_flag;
  aetr_flag_builder #(.N_BANKS(NB), .GROUPS(NG)) dut_b (
    .clk, .rst_n, .start(b_start), .prof_valid(b_valid), .prof_ready(b_ready),
    .prof_short(b_short), .busy(b_busy), .done(b_done), .wr_en(b_we),
    .wr_bank(b_bank), .wr_group(b_group), .wr_flag(b_flag));

  bit prof [NB][NG];
  int exp_bank [$], exp_group [$], exp_flag [$];
  int b_n = 0;

  function automatic int largest_allowed(int len);
    int best = 1;
    foreach (sizes[i]) if (sizes[i] <= len) best = sizes[i];
    return best;
  endfunction

  function automatic int code_of(int s);
    foreach (sizes[i]) if (sizes[i] == s) return i;
    return -1;
  endfunction

  task automatic build_reference();
    exp_bank.delete(); exp_group.delete(); exp_flag.delete();
    for (int b = 0; b < NB; b++) begin
      automatic int g = 0;
      while (g < NG) begin
        int len = 1, s;
        while (g + len < NG && len < 32 && prof[b][g + len] == prof[b][g]) len++;
        s = largest_allowed(len);
        exp_bank.push_back(b); exp_group.push_back(g);
        exp_flag.push_back((int'(prof[b][g]) << 3) | code_of(s));
        size_seen[code_of(s)]++;
        g += s;
      end
    end
  endtask

  always @(posedge clk) if (rst_n && b_we) begin
    checks++;
    if (b_n >= exp_flag.size() || int'(b_bank) != exp_bank[b_n] ||
        int'(b_group) != exp_group[b_n] || int'(b_flag) != exp_flag[b_n]) begin
      failures++;
      $display("random write %0d: bank %0d group %0d flag %b", b_n, b_bank, b_group, b_flag);
    end
    b_n++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // part 1
    @(negedge clk) a_start = 1;
    @(negedge clk) a_start = 0;
    for (int g = 0; g < 16; g++) begin
      a_valid = 1; a_short = (g == 11);
      @(posedge clk);
      while (!a_ready) @(posedge clk);
      @(negedge clk);
    end
    a_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (a_n != 4 || !a_done) begin
      failures++;
      $display("example: %0d writes, done %b", a_n, a_done);
    end

    // part 2
    for (int pass = 0; pass < 12; pass++) begin
      for (int b = 0; b < NB; b++) begin
        automatic int g = 0;
        while (g < NG) begin
          automatic int len = (pass % 3 == 0) ? $urandom_range(1, 8) : $urandom_range(1, 45);
          automatic bit v = $urandom_range(0, 1);
          for (int k = 0; k < len && g < NG; k++) prof[b][g++] = v;
        end
      end
      build_reference();
      b_n = 0;
      @(negedge clk) b_start = 1;
      @(negedge clk) b_start = 0;
      for (int b = 0; b < NB; b++)
        for (int g = 0; g < NG; g++) begin
          while ($urandom_range(0, 3) == 0) begin
            b_valid = 0;
            @(negedge clk);
          end
          b_valid = 1; b_short = prof[b][g];
          @(posedge clk);
          while (!b_ready) @(posedge clk);
          @(negedge clk);
        end
      b_valid = 0;
      repeat (40) @(posedge clk);
      checks++;
      if (b_n != exp_flag.size() || !b_done) begin
        failures++;
        $display("pass %0d: %0d writes, expected %0d, done %b", pass, b_n, exp_flag.size(), b_done);
      end
    end
    foreach (size_seen[i]) begin
      checks++;
      if (size_seen[i] == 0) begin
        failures++;
        $display("size %0d never produced", sizes[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
