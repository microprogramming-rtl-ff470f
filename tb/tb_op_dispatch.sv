// tb_op_dispatch: checks the opcode-to-op-group map for all 64 opcodes
// against a list written here; opcodes without a group must give fetch0.
module tb_op_dispatch;
  import ucode_pkg::*;
  opcode_t opc;
  uaddr_t  grp;
  int checks = 0, failures = 0;

  op_dispatch dut (.opcode(opc), .op_group(grp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int o = 0; o < 64; o++) begin
      case (o)
        'h00: exp = 4;
        'h08, 'h09, 'h0A, 'h0B: exp = 7;
        'h0C, 'h0D, 'h0E, 'h0F: exp = 10;
        'h23: exp = 13;
        'h2B: exp = 18;
        'h04: exp = 23;
        'h05: exp = 28;
        'h02: exp = 33;
        'h12: exp = 36;
        'h03: exp = 38;
        'h13: exp = 42;
        'h3C: exp = 46;
        'h3D: exp = 53;
        'h3E: exp = 57;
        default: exp = 0;
      endcase
      opc = 6'(o);
      #1;
      checks++;
      if (int'(grp) != exp) begin
        failures++;
        $display("FAIL opcode=%h group=%0d exp=%0d", o, grp, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
