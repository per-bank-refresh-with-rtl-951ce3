// aetr_flag_store: the 4-bit AETR flags of all base row groups of all banks.
//
// In the DRAM the flag of a row group sits in extra cells of the group's
// first row. This array stands for those cells: entry (bank, group) holds the
// flag written for base row group `group` of bank `bank`. Only the entries
// at the first base group of each merged row group are meaningful; the
// others are never read by the refresh controller. Keeping the flags in one
// array with separate ports is this design's choice.
//
// Interface: one write port (we, wbank, wgroup, wdata) used by the flag
// builder, one read port (re, rbank, rgroup, rdata) used by the refresh
// controller. Timing: writes take effect at the clock edge; reads are
// synchronous, rdata is valid in the cycle after re and holds until the next
// read. Array contents are not reset.
module aetr_flag_store
  import aetr_pkg::*;
#(
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned GROUPS  = 32768,
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned AW = $clog2(GROUPS),
  localparam int unsigned DEPTH = N_BANKS * GROUPS
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] wgroup,
  input  flag_t         wdata,
  input  logic          re,
  input  logic [BW-1:0] rbank,
  input  logic [AW-1:0] rgroup,
  output flag_t         rdata
);

  localparam int unsigned IW = $clog2(DEPTH);

  flag_t mem [DEPTH];

  logic [IW-1:0] widx, ridx;
  assign widx = IW'(wbank) * IW'(GROUPS) + IW'(wgroup);
  assign ridx = IW'(rbank) * IW'(GROUPS) + IW'(rgroup);

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
    if (re) rdata <= mem[ridx];
  end

endmodule
