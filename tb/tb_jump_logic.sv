// tb_jump_logic: exhaustive check of the next-uPC source for every
// uJumpType and every zero / busy combination, against the jump table.
module tb_jump_logic;
  import ucode_pkg::*;
  ujump_e  j;
  logic    zero, busy;
  upcsrc_e src;
  int checks = 0, failures = 0;

  jump_logic dut (.jump(j), .zero(zero), .busy(busy), .src(src));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upcsrc_e exp;
    for (int k = 0; k < 6; k++)
      for (int z = 0; z < 2; z++)
        for (int bz = 0; bz < 2; bz++) begin
          j = ujump_e'(k); zero = z[0]; busy = bz[0];
          #1;
          if (k == 0)      exp = SRC_INC;
          else if (k == 1) exp = (bz == 1) ? SRC_HOLD : SRC_INC;
          else if (k == 2) exp = SRC_ABSOLUTE;
          else if (k == 3) exp = SRC_OPGROUP;
          else if (k == 4) exp = (z == 1) ? SRC_ABSOLUTE : SRC_INC;
          else             exp = (z == 1) ? SRC_INC : SRC_ABSOLUTE;
          checks++;
          if (src !== exp) begin
            failures++;
            $display("FAIL jump=%0d zero=%0d busy=%0d src=%0d exp=%0d", k, z, bz, src, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
