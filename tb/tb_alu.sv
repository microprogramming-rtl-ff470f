// tb_alu: checks every ALU operation on random and corner operands against
// results computed here with 64-bit arithmetic, and the zero? output (A == 0).
module tb_alu;
  import ucode_pkg::*;
  aluop_e      op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.alu_op(op), .a(a), .b(b), .y(y), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(aluop_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'(x), uz = longint'(z);
    case (o)
      ALU_ADD:   return 32'(ux + uz);
      ALU_SUB:   return 32'(ux - uz);
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_NOR:   return ~(x | z);
      ALU_SLT:   return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU:  return (ux < uz) ? 32'd1 : 32'd0;
      ALU_SLL:   return 32'(ux * (64'd1 << z[4:0]));
      ALU_SRL:   return 32'(ux / (64'd1 << z[4:0]));
      ALU_SRA:   return 32'(sx >>> z[4:0]);
      ALU_LUI:   return 32'(uz * 65536);
      ALU_INC4:  return 32'(ux + 4);
      ALU_JTARG: return (x & 32'hF000_0000) | ((z & 32'h03FF_FFFF) * 4);
      ALU_PASSA: return x;
      default:   return z;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom;
      if (n == 0) begin a = 0; b = 0; end
      if (n == 1) begin a = 32'h8000_0000; b = 32'h7FFF_FFFF; end
      if (n == 2) begin a = 32'hFFFF_FFFF; b = 1; end
      for (int o = 0; o < 16; o++) begin
        op = aluop_e'(o);
        #1;
        checks++;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, model(op, a, b));
        end
        checks++;
        if (zero !== (a == 0)) begin failures++; $display("FAIL zero a=%h", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
