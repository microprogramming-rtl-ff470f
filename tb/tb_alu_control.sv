// tb_alu_control: checks the ALU-operation selection.  For every OpSel the
// expected operation is listed by hand: the fixed selections, every decoded
// func code (register instructions) and opcode (immediate instructions), and
// unknown codes falling back to ADD.
module tb_alu_control;
  import ucode_pkg::*;
  opsel_e      sel;
  logic [31:0] ir;
  aluop_e      op;
  int checks = 0, failures = 0;

  alu_control dut (.op_sel(sel), .ir(ir), .alu_op(op));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(opsel_e s, logic [31:0] i, aluop_e e);
    sel = s; ir = i; #1;
    checks++;
    if (op !== e) begin
      failures++;
      $display("FAIL sel=%0d ir=%h op=%0d exp=%0d", s, i, op, e);
    end
  endtask

  initial begin
    func_t   fn [13]  = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B, 6'h04, 6'h06, 6'h07};
    aluop_e  fe [13]  = '{ALU_ADD, ALU_ADD, ALU_SUB, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                          ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA};
    opcode_t oc [8]   = '{6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F};
    aluop_e  oe [8]   = '{ALU_ADD, ALU_ADD, ALU_SLT, ALU_SLTU, ALU_AND, ALU_OR, ALU_XOR, ALU_LUI};
    for (int n = 0; n < 20; n++) begin
      logic [31:0] r = $urandom;
      expect_op(OS_ADD,   r, ALU_ADD);
      expect_op(OS_INC4,  r, ALU_INC4);
      expect_op(OS_JTARG, r, ALU_JTARG);
      expect_op(OS_PASSA, r, ALU_PASSA);
      expect_op(OS_PASSB, r, ALU_PASSB);
      for (int k = 0; k < 13; k++) expect_op(OS_FUNC, {r[31:6], fn[k]}, fe[k]);
      for (int k = 0; k < 8; k++)  expect_op(OS_OPC, {oc[k], r[25:0]}, oe[k]);
    end
    expect_op(OS_FUNC, 32'h0000_0001, ALU_ADD);   // unknown func
    expect_op(OS_OPC,  32'hFC00_0000, ALU_ADD);   // unknown opcode
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
