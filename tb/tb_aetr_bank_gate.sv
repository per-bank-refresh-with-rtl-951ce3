// tb_aetr_bank_gate: random accesses and refresh requests on 4 banks against
// a per-bank occupancy model. Checks acc_ready, bank_free and acc_blocked
// every cycle, and that accesses to other banks were admitted while some
// bank had a refresh request.
module tb_aetr_bank_gate;
  localparam int unsigned N = 4, T_ACCESS = 5;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] acc_valid = '0, ref_req = '0, acc_ready, bank_free, acc_blocked;
  int checks = 0, failures = 0;
  int occ [N];
  int parallel = 0, blocked = 0;

  aetr_bank_gate #(.N_BANKS(N), .T_ACCESS(T_ACCESS)) dut (
    .clk, .rst_n, .acc_valid, .acc_ready, .ref_req, .bank_free, .acc_blocked);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (occ[b]) occ[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int b = 0; b < N; b++) begin
        acc_valid[b] = ($urandom_range(0, 2) == 0);
        ref_req[b]   = ($urandom_range(0, 9) < 3);
      end
      #1;
      for (int b = 0; b < N; b++) begin
        automatic bit exp_ready = (occ[b] == 0) && !ref_req[b];
        checks++;
        if (acc_ready[b] != exp_ready || bank_free[b] != (occ[b] == 0) ||
            acc_blocked[b] != (acc_valid[b] && occ[b] == 0 && ref_req[b])) begin
          failures++;
          $display("cycle %0d bank %0d: ready %b free %b blocked %b occ %0d", i, b,
                   acc_ready[b], bank_free[b], acc_blocked[b], occ[b]);
        end
        if (acc_blocked[b]) blocked++;
        if (acc_valid[b] && exp_ready && ref_req != '0) parallel++;
      end
      @(posedge clk);
      for (int b = 0; b < N; b++) begin
        if (acc_valid[b] && occ[b] == 0 && !ref_req[b]) occ[b] = T_ACCESS;
        else if (occ[b] > 0) occ[b]--;
      end
    end
    checks++;
    if (parallel == 0 || blocked == 0) begin
      failures++;
      $display("parallel %0d blocked %0d", parallel, blocked);
    end
    $display("parallel=%0d blocked=%0d", parallel, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
