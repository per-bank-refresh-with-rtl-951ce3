// tb_aetr_flag_decode: exhaustive check of the AETR flag decoder.
// All 16 flag values are applied; the retention bit must be the flag MSB and
// the size must follow the list 1, 2, 3, 4, 8, 16, 24, 32 for codes 0..7.
module tb_aetr_flag_decode;
  import aetr_pkg::*;

  flag_t             flag;
  logic              ret_short;
  logic [SIZE_W-1:0] size;
  int checks = 0, failures = 0;
  int exp_size [8] = '{1, 2, 3, 4, 8, 16, 24, 32};

  aetr_flag_decode dut (.flag, .ret_short, .size);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      flag = flag_t'(v[3:0]);
      #1;
      checks++;
      if (ret_short !== v[3]) begin
        failures++;
        $display("flag %b: ret_short %b", v[3:0], ret_short);
      end
      checks++;
      if (int'(size) != exp_size[v & 7]) begin
        failures++;
        $display("flag %b: size %0d expected %0d", v[3:0], size, exp_size[v & 7]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
