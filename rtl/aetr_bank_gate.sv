// aetr_bank_gate: per-bank access admission for per-bank refresh.
//
// Each bank has its own request handshake (acc_valid/acc_ready). A bank
// accepts an access when it is not busy with an earlier access and no
// refresh is requested or running for it; an accepted access occupies the
// bank for T_ACCESS cycles. A refresh request blocks only its own bank, so
// the other banks of the rank keep serving accesses, which is the point of
// per-bank refresh. bank_free tells the refresh controller that a bank has no
// access in flight, so a refresh can start there.
// Blocking only the refreshed bank follows the document; the fixed access
// occupancy (tRCD + CL + tRP by default) and the per-bank handshake are this
// design's stand-in for a real command scheduler.
//
// Interface: acc_valid/acc_ready per bank; ref_req per bank in (pending or
// running refresh); bank_free and acc_blocked (a valid access held back by a
// refresh) per bank out.
// Timing: acc_ready is combinational from the registered occupancy and
// ref_req; an access accepted in cycle t makes the bank busy from t+1 for
// T_ACCESS cycles.
module aetr_bank_gate #(
  parameter int unsigned N_BANKS  = 8,
  parameter int unsigned T_ACCESS = 27,   // tRCD + CL + tRP at 667 MHz
  localparam int unsigned CW = $clog2(T_ACCESS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_BANKS-1:0] acc_valid,
  output logic [N_BANKS-1:0] acc_ready,
  input  logic [N_BANKS-1:0] ref_req,
  output logic [N_BANKS-1:0] bank_free,
  output logic [N_BANKS-1:0] acc_blocked
);

  logic [CW-1:0] occ [N_BANKS];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    assign bank_free[b]   = (occ[b] == '0);
    assign acc_ready[b]   = bank_free[b] && !ref_req[b];
    assign acc_blocked[b] = acc_valid[b] && bank_free[b] && ref_req[b];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                          occ[b] <= '0;
      else if (acc_valid[b] && acc_ready[b]) occ[b] <= CW'(T_ACCESS);
      else if (occ[b] != '0)               occ[b] <= occ[b] - 1'b1;
    end

    // No access is admitted to a bank while its refresh is requested.
    a_no_acc_in_ref: assert property (@(posedge clk) disable iff (!rst_n)
                                      ref_req[b] |-> !acc_ready[b]);
  end

endmodule
