// aetr_pkg: types and constants shared by the adaptive early termination
// refresh (AETR) blocks.
//
// Every row group carries a 4-bit flag in its first row. The flag is split
// 1:3, a retention bit and a 3-bit size code:
//   ret_short = 1 : the group holds a weak cell and is refreshed every 64 ms
//   ret_short = 0 : the group is refreshed every 256 ms
//   size_code     : 000..111 = 1, 2, 3, 4, 8, 16, 24, 32 base row groups
// A base row group is a quarter of a conventional per-bank refresh group.
// The flag layout and the size list follow the (1:3) scheme; the bit order
// inside the flag (retention bit as the MSB) follows the flag column drawn
// for the scheme.
package aetr_pkg;

  localparam int unsigned SIZE_CODE_W = 3;
  localparam int unsigned MAX_GROUP   = 32;  // largest merged group, base groups
  localparam int unsigned SIZE_W      = 6;   // wide enough for 1..32

  typedef struct packed {
    logic                   ret_short;  // 1 = 64 ms group, 0 = 256 ms group
    logic [SIZE_CODE_W-1:0] size_code;  // index into the allowed size list
  } flag_t;

  // Largest allowed group size not above len (len in 1..32), as a size code.
  // Used when a run of equal-retention base groups is cut into groups.
  function automatic logic [SIZE_CODE_W-1:0] code_for_run(input logic [SIZE_W-1:0] len);
    if (len >= 6'd32)      return 3'd7;
    else if (len >= 6'd24) return 3'd6;
    else if (len >= 6'd16) return 3'd5;
    else if (len >= 6'd8)  return 3'd4;
    else if (len >= 6'd4)  return 3'd3;
    else if (len >= 6'd3)  return 3'd2;
    else if (len >= 6'd2)  return 3'd1;
    else                   return 3'd0;
  endfunction

endpackage
