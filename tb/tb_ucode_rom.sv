// tb_ucode_rom: checks every control-store word against the microprogram
// tables, written out here by hand: which of the load / enable / write
// signals are set, the RegSel, OpSel and ExtSel values where they matter,
// and the uJumpType.  Words beyond the program must be a no-operation that
// jumps to fetch.
module tb_ucode_rom;
  import ucode_pkg::*;
  uaddr_t addr;
  uinst_t data;
  int checks = 0, failures = 0;

  ucode_rom dut (.addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flags: ldIR ldA ldB ldMA RegWrt enReg MemWrt enMem enImm enALU
  typedef struct {
    logic [9:0] f;
    regsel_e    rs;
    opsel_e     os;
    extsel_e    es;
    ujump_e     j;
  } exp_t;

  exp_t e [64];

  function automatic exp_t E(logic [9:0] f, regsel_e rs, opsel_e os, extsel_e es, ujump_e j);
    exp_t x; x.f = f; x.rs = rs; x.os = os; x.es = es; x.j = j; return x;
  endfunction

  initial begin
    localparam regsel_e P = RS_PC;
    localparam opsel_e  F = OS_FUNC;
    localparam extsel_e S = EX_SEXT16;
    for (int i = 0; i < 64; i++) e[i] = E(10'b0000000000, P, F, S, J_FETCH);
    // fetch
    e[0]  = E(10'b0001010000, RS_PC,  F, S, J_NEXT);      // MA <- PC
    e[1]  = E(10'b1000000100, P,      F, S, J_SPIN);      // IR <- Memory
    e[2]  = E(10'b0100010000, RS_PC,  F, S, J_NEXT);      // A <- PC
    e[3]  = E(10'b0000110001, RS_PC,  OS_INC4, S, J_DISPATCH); // PC <- A+4
    // ALU
    e[4]  = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[5]  = E(10'b0010010000, RS_RT,  F, S, J_NEXT);
    e[6]  = E(10'b0000110001, RS_RD,  OS_FUNC, S, J_FETCH);
    // ALUi (sExt) and ALUi (uExt)
    e[7]  = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[8]  = E(10'b0010000010, P,      F, EX_SEXT16, J_NEXT);
    e[9]  = E(10'b0000110001, RS_RT,  OS_OPC, S, J_FETCH);
    e[10] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[11] = E(10'b0010000010, P,      F, EX_UEXT16, J_NEXT);
    e[12] = E(10'b0000110001, RS_RT,  OS_OPC, S, J_FETCH);
    // LW
    e[13] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[14] = E(10'b0010000010, P,      F, EX_SEXT16, J_NEXT);
    e[15] = E(10'b0001000001, P,      OS_ADD, S, J_NEXT);
    e[16] = E(10'b0000110100, RS_RT,  F, S, J_SPIN);
    e[17] = E(10'b0000000000, P,      F, S, J_FETCH);
    // SW
    e[18] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[19] = E(10'b0010000010, P,      F, EX_SEXT16, J_NEXT);
    e[20] = E(10'b0001000001, P,      OS_ADD, S, J_NEXT);
    e[21] = E(10'b0000011100, RS_RT,  F, S, J_SPIN);
    e[22] = E(10'b0000000000, P,      F, S, J_FETCH);
    // BEQZ
    e[23] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[24] = E(10'b0000000000, P,      F, S, J_FNEZ);
    e[25] = E(10'b0100010000, RS_PC,  F, S, J_NEXT);
    e[26] = E(10'b0010000010, P,      F, EX_SEXT16_SH2, J_NEXT);
    e[27] = E(10'b0000110001, RS_PC,  OS_ADD, S, J_FETCH);
    // BNEZ
    e[28] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[29] = E(10'b0000000000, P,      F, S, J_FEQZ);
    e[30] = E(10'b0100010000, RS_PC,  F, S, J_NEXT);
    e[31] = E(10'b0010000010, P,      F, EX_SEXT16_SH2, J_NEXT);
    e[32] = E(10'b0000110001, RS_PC,  OS_ADD, S, J_FETCH);
    // J
    e[33] = E(10'b0100010000, RS_PC,  F, S, J_NEXT);
    e[34] = E(10'b0010000010, P,      F, EX_IR, J_NEXT);
    e[35] = E(10'b0000110001, RS_PC,  OS_JTARG, S, J_FETCH);
    // JR
    e[36] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[37] = E(10'b0000110001, RS_PC,  OS_PASSA, S, J_FETCH);
    // JAL
    e[38] = E(10'b0100010000, RS_PC,  F, S, J_NEXT);
    e[39] = E(10'b0000110001, RS_LINK, OS_PASSA, S, J_NEXT);
    e[40] = E(10'b0010000010, P,      F, EX_IR, J_NEXT);
    e[41] = E(10'b0000110001, RS_PC,  OS_JTARG, S, J_FETCH);
    // JALR
    e[42] = E(10'b0100010000, RS_PC,  F, S, J_NEXT);
    e[43] = E(10'b0010010000, RS_RS,  F, S, J_NEXT);
    e[44] = E(10'b0000110001, RS_LINK, OS_PASSA, S, J_NEXT);
    e[45] = E(10'b0000110001, RS_PC,  OS_PASSB, S, J_FETCH);
    // ALUMM
    e[46] = E(10'b0001010000, RS_RS,  F, S, J_NEXT);
    e[47] = E(10'b0100000100, P,      F, S, J_SPIN);
    e[48] = E(10'b0001010000, RS_RT,  F, S, J_NEXT);
    e[49] = E(10'b0010000100, P,      F, S, J_SPIN);
    e[50] = E(10'b0001010000, RS_RD,  F, S, J_NEXT);
    e[51] = E(10'b0000001101, P,      OS_FUNC, S, J_SPIN);
    e[52] = E(10'b0000000000, P,      F, S, J_FETCH);
    // ALUMS
    e[53] = E(10'b0001010000, RS_RS,  F, S, J_NEXT);
    e[54] = E(10'b0100000100, P,      F, S, J_SPIN);
    e[55] = E(10'b0010010000, RS_RT,  F, S, J_NEXT);
    e[56] = E(10'b0000110001, RS_RD,  OS_FUNC, S, J_FETCH);
    // ALUMD
    e[57] = E(10'b0100010000, RS_RS,  F, S, J_NEXT);
    e[58] = E(10'b0010010000, RS_RT,  F, S, J_NEXT);
    e[59] = E(10'b0001010000, RS_RD,  F, S, J_NEXT);
    e[60] = E(10'b0000001101, P,      OS_FUNC, S, J_SPIN);
    e[61] = E(10'b0000000000, P,      F, S, J_FETCH);

    for (int a = 0; a < 64; a++) begin
      logic [9:0] got;
      addr = 6'(a);
      #1;
      got = {data.ctrl.ldIR, data.ctrl.ldA, data.ctrl.ldB, data.ctrl.ldMA, data.ctrl.RegWrt,
             data.ctrl.enReg, data.ctrl.MemWrt, data.ctrl.enMem, data.ctrl.enImm, data.ctrl.enALU};
      checks++;
      if (got !== e[a].f) begin failures++; $display("FAIL word %0d flags %b exp %b", a, got, e[a].f); end
      checks++;
      if (data.jump !== e[a].j) begin failures++; $display("FAIL word %0d jump %0d exp %0d", a, data.jump, e[a].j); end
      if (data.ctrl.enReg) begin
        checks++;
        if (data.ctrl.RegSel !== e[a].rs) begin failures++; $display("FAIL word %0d RegSel", a); end
      end
      if (data.ctrl.enALU) begin
        checks++;
        if (data.ctrl.OpSel !== e[a].os) begin failures++; $display("FAIL word %0d OpSel", a); end
      end
      if (data.ctrl.enImm) begin
        checks++;
        if (data.ctrl.ExtSel !== e[a].es) begin failures++; $display("FAIL word %0d ExtSel", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
