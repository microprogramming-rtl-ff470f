// tb_datapath: drives the datapath's control word directly, one bus transfer
// per cycle, as the microcode would, and checks the bus value of every
// transfer and the registers it loads against a model of the register file
// kept here.  It runs the fetch transfers (MA <- PC, IR <- Memory, A <- PC,
// PC <- A+4), then random register-register ALU operations
// (A <- Reg[rs]; B <- Reg[rt]; Reg[rd] <- func(A,B)), register loads
// through B <- IR, a jump-target computation and a link-register write.
module tb_datapath;
  import ucode_pkg::*;
  logic        clk = 0, rst = 1;
  ctrl_t       ctrl = CTRL_NOP;
  logic [31:0] mem_rdata = 0, bus, ma, pc, ir;
  logic        mem_drive = 0, zero;
  opcode_t     opcode;
  int checks = 0, failures = 0;
  logic [31:0] regs [33];

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one cycle: apply the control word, return the bus value before the edge
  task automatic xfer(ctrl_t c, output logic [31:0] b, input logic [31:0] md = 0, input bit drv = 0);
    @(negedge clk);
    ctrl = c; mem_rdata = md; mem_drive = drv;
    #1;
    b = bus;
    @(posedge clk);
    #1;
    ctrl = CTRL_NOP; mem_drive = 0;
  endtask

  function automatic ctrl_t rd_reg(regsel_e s);
    ctrl_t c = CTRL_NOP; c.enReg = 1; c.RegSel = s; return c;
  endfunction

  function automatic logic [5:0] ridx(regsel_e s, logic [31:0] i);
    case (s)
      RS_PC:   return 32;
      RS_LINK: return 31;
      RS_RD:   return {1'b0, i[15:11]};
      RS_RT:   return {1'b0, i[20:16]};
      default: return {1'b0, i[25:21]};
    endcase
  endfunction

  initial begin
    ctrl_t c;
    logic [31:0] b, instr, va, vb, exp;
    for (int i = 0; i < 33; i++) regs[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // ---- fetch transfers
    c = rd_reg(RS_PC); c.ldMA = 1; xfer(c, b);
    chk(b == 0 && ma == 0, "MA <- PC");
    instr = {OPC_ADDI, 5'd0, 5'd5, 16'hFFF9};
    c = CTRL_NOP; c.ldIR = 1; xfer(c, b, instr, 1);
    chk(ir == instr && opcode == OPC_ADDI, "IR <- Memory");
    c = rd_reg(RS_PC); c.ldA = 1; xfer(c, b);
    c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_INC4; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_PC; xfer(c, b);
    chk(b == 4 && pc == 4, "PC <- A + 4");
    regs[32] = 4;
    // ---- ADDI r5 <- r0 + (-7)
    c = rd_reg(RS_RS); c.ldA = 1; xfer(c, b);
    chk(zero == 1, "zero? after A <- r0");
    c = CTRL_NOP; c.enImm = 1; c.ExtSel = EX_SEXT16; c.ldB = 1; xfer(c, b);
    chk(b == 32'hFFFF_FFF9, "B <- sExt16(Imm)");
    c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_OPC; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_RT; xfer(c, b);
    chk(b == 32'hFFFF_FFF9, "Reg[rt] <- Op(A,B)");
    regs[5] = 32'hFFFF_FFF9;
    c = rd_reg(RS_RT); c.ldA = 1; xfer(c, b);
    chk(b == regs[5] && zero == 0, "read back r5, zero? clear");
    // ---- load random values into registers: IR <- word; B <- IR; Reg[rd] <- B
    for (int r = 1; r < 32; r++) begin
      instr = $urandom;
      instr[15:11] = 5'(r);
      c = CTRL_NOP; c.ldIR = 1; xfer(c, b, instr, 1);
      c = CTRL_NOP; c.enImm = 1; c.ExtSel = EX_IR; c.ldB = 1; xfer(c, b);
      chk(b == instr, "B <- IR");
      c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_PASSB; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_RD; xfer(c, b);
      regs[r] = instr;
    end
    // ---- random register ALU operations
    for (int n = 0; n < 300; n++) begin
      func_t fns [6] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLTU};
      func_t fn = fns[$urandom_range(0, 5)];
      instr = {OPC_ALU, 5'($urandom), 5'($urandom), 5'($urandom), 5'd0, fn};
      c = CTRL_NOP; c.ldIR = 1; xfer(c, b, instr, 1);
      c = rd_reg(RS_RS); c.ldA = 1; xfer(c, b);
      va = regs[ridx(RS_RS, instr)];
      chk(b == va, "A <- Reg[rs]");
      c = rd_reg(RS_RT); c.ldB = 1; xfer(c, b);
      vb = regs[ridx(RS_RT, instr)];
      chk(b == vb, "B <- Reg[rt]");
      case (fn)
        FN_ADD:  exp = va + vb;
        FN_SUB:  exp = va - vb;
        FN_AND:  exp = va & vb;
        FN_OR:   exp = va | vb;
        FN_XOR:  exp = va ^ vb;
        default: exp = (va < vb) ? 1 : 0;
      endcase
      c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_FUNC; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_RD; xfer(c, b);
      chk(b == exp, $sformatf("Reg[rd] <- func(A,B): %h exp %h", b, exp));
      if (ridx(RS_RD, instr) != 0) regs[ridx(RS_RD, instr)] = exp;
    end
    // ---- J-type target and link write
    instr = {OPC_JAL, 26'h2AB_CDEF};
    c = CTRL_NOP; c.ldIR = 1; xfer(c, b, instr, 1);
    c = rd_reg(RS_PC); c.ldA = 1; xfer(c, b);
    c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_PASSA; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_LINK; xfer(c, b);
    c = CTRL_NOP; c.enImm = 1; c.ExtSel = EX_IR; c.ldB = 1; xfer(c, b);
    c = CTRL_NOP; c.enALU = 1; c.OpSel = OS_JTARG; c.enReg = 1; c.RegWrt = 1; c.RegSel = RS_PC; xfer(c, b);
    chk(pc == {regs[32][31:28], 26'h2AB_CDEF, 2'b00}, "PC <- JumpTarg(A,B)");
    c = rd_reg(RS_LINK); c.ldMA = 1; xfer(c, b);
    chk(b == regs[32] && ma == regs[32], "Reg[31] holds the old PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
