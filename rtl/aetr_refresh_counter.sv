// aetr_refresh_counter: the per-bank Refresh Counter of AETR.
//
// The counter holds the index of the first base row group of the next row
// group to be visited in its bank. Each time a row group has been handled
// (refreshed or skipped) it is advanced by that group's size, so merged
// groups are stepped over in one move. When the next index would reach or
// pass the end of the bank, the counter returns to 0 and raises done: the
// bank has finished its 64 ms round. clear (asserted at the start of every
// 64 ms window) restarts the round.
// Stepping by the decoded size follows the document; the done flag and the
// clear input are this design's choice for pacing rounds.
//
// Interface: clear, advance and step in; value and done out.
// Timing: value and done change on the clock edge after clear or advance;
// clear wins over advance; advance is ignored while done is set.
module aetr_refresh_counter
  import aetr_pkg::*;
#(
  parameter int unsigned GROUPS = 32768,            // base row groups per bank
  localparam int unsigned AW    = $clog2(GROUPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              advance,
  input  logic [SIZE_W-1:0] step,
  output logic [AW-1:0]     value,
  output logic              done
);

  logic [AW:0] next_sum;
  assign next_sum = {1'b0, value} + (AW+1)'(step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
      done  <= 1'b0;
    end else if (clear) begin
      value <= '0;
      done  <= 1'b0;
    end else if (advance && !done) begin
      if (next_sum >= (AW+1)'(GROUPS)) begin
        value <= '0;
        done  <= 1'b1;
      end else begin
        value <= next_sum[AW-1:0];
      end
    end
  end

endmodule
