// aetr_flag_decode: combinational decoder of a 4-bit AETR row-group flag.
//
// The flag read from the first row of a row group is split into its
// retention bit and its 3-bit size code, and the code is mapped to the group
// size in base row groups: 000..111 -> 1, 2, 3, 4, 8, 16, 24, 32. The size is
// what the Refresh Counter is advanced by to reach the next row group.
// The mapping is the document's; the binary encoding of the size output is
// this design's own.
//
// Interface: flag (aetr_pkg::flag_t) in; ret_short and size (1..32) out.
// Timing: purely combinational, no clock.
module aetr_flag_decode
  import aetr_pkg::*;
(
  input  flag_t             flag,
  output logic              ret_short,
  output logic [SIZE_W-1:0] size
);

  always_comb begin
    ret_short = flag.ret_short;
    unique case (flag.size_code)
      3'd0:    size = 6'd1;
      3'd1:    size = 6'd2;
      3'd2:    size = 6'd3;
      3'd3:    size = 6'd4;
      3'd4:    size = 6'd8;
      3'd5:    size = 6'd16;
      3'd6:    size = 6'd24;
      default: size = 6'd32;
    endcase
  end

endmodule
