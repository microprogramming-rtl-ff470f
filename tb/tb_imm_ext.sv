// tb_imm_ext: checks the immediate extender against arithmetic done here.
// For random instruction words and every ExtSel value the output must be the
// sign-extended, zero-extended, sign-extended-times-four immediate or the IR.
module tb_imm_ext;
  import ucode_pkg::*;
  logic [31:0] ir, imm;
  extsel_e     sel;
  int checks = 0, failures = 0;

  imm_ext dut (.ir(ir), .ext_sel(sel), .imm(imm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int v;
    for (int n = 0; n < 400; n++) begin
      ir = $urandom;
      if (n == 0) ir = 32'h0000_8000;
      if (n == 1) ir = 32'hFFFF_7FFF;
      for (int s = 0; s < 4; s++) begin
        sel = extsel_e'(s);
        #1;
        v = int'($signed(ir[15:0]));          // -32768 .. 32767
        case (s)
          0: exp = 32'(v);
          1: exp = 32'(int'(ir[15:0]));
          2: exp = 32'(v * 4);
          default: exp = ir;
        endcase
        checks++;
        if (imm !== exp) begin
          failures++;
          $display("FAIL ir=%h sel=%0d imm=%h exp=%h", ir, s, imm, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
