// tb_nano_controller: checks the nanocoded controller.  With the opcode,
// zero? and busy driven by the testbench it follows the uPC through the
// fetch sequence (holding in the spin state while busy), the dispatch to
// each op-group, the feqz / fnez branches both ways and the jump back to
// fetch, and counts the cycles of each instruction against the lengths of
// the microprogram tables.  In every cycle the control word that comes out
// of the two ROM levels is compared with the microprogram table written out
// here by hand (set flags, RegSel / OpSel / ExtSel where used, uJumpType).
module tb_nano_controller;
  import ucode_pkg::*;
  logic    clk = 0, rst = 1;
  opcode_t opcode = 0;
  logic    zero = 0, busy = 0;
  ctrl_t   ctrl;
  uaddr_t  upc;
  ujump_e  jump;
  int checks = 0, failures = 0;

  nano_controller dut (.*);

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

  int n_words = 0;
  always @(negedge clk) if (!rst) begin
    logic [9:0] got;
    got = {ctrl.ldIR, ctrl.ldA, ctrl.ldB, ctrl.ldMA, ctrl.RegWrt,
           ctrl.enReg, ctrl.MemWrt, ctrl.enMem, ctrl.enImm, ctrl.enALU};
    n_words++;
    chk(got === e[upc].f && jump === e[upc].j, $sformatf("word %0d flags %b jump %0d", upc, got, jump));
    if (ctrl.enReg) chk(ctrl.RegSel === e[upc].rs, $sformatf("word %0d RegSel", upc));
    if (ctrl.enALU) chk(ctrl.OpSel === e[upc].os, $sformatf("word %0d OpSel", upc));
    if (ctrl.enImm) chk(ctrl.ExtSel === e[upc].es, $sformatf("word %0d ExtSel", upc));
  end


  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one instruction from fetch0: busy is held high for nbusy cycles in
  // every memory (spin) state.  Returns the cycles until fetch0 again.
  task automatic run_instr(opcode_t opc, bit z, int nbusy, output int cyc, output uaddr_t entry);
    int held = 0;
    bit was_dispatch = 0;
    cyc = 0;
    entry = '0;
    chk(upc == UA_FETCH0, "instruction starts at fetch0");
    do begin
      opcode = opc; zero = z;
      busy = (jump == J_SPIN) && (held < nbusy);
      #1;
      if (jump == J_SPIN) begin
        if (busy) held++;
        else held = 0;
      end
      was_dispatch = (jump == J_DISPATCH);
      @(negedge clk);
      if (was_dispatch) entry = upc;
      cyc++;
    end while (upc != UA_FETCH0 && cyc < 100);
    busy = 0;
  endtask

  initial begin
    int cyc;
    uaddr_t ent;
    opcode_t ops [15] = '{OPC_ALU, OPC_ADDI, OPC_ORI, OPC_LW, OPC_SW, OPC_BEQZ, OPC_BNEZ,
                          OPC_J, OPC_JR, OPC_JAL, OPC_JALR, OPC_ALUMM, OPC_ALUMS, OPC_ALUMD,
                          6'h3F};
    // expected entry and length after fetch for zero = 0 (memory states not busy)
    int     ent_e [15] = '{4, 7, 10, 13, 18, 23, 28, 33, 36, 38, 42, 46, 53, 57, 0};
    int     len_e [15] = '{3, 3, 3, 5, 5, 2, 5, 3, 2, 4, 4, 7, 4, 5, 0};
    int     nmem  [15] = '{0, 0, 0, 1, 1, 0, 0, 0, 0, 0, 0, 3, 1, 1, 0};
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

    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    chk(upc == UA_FETCH0 && ctrl.ldMA && ctrl.enReg && ctrl.RegSel == RS_PC, "reset to fetch0: MA <- PC");
    for (int nb = 0; nb < 3; nb++)
      for (int k = 0; k < 15; k++) begin
        run_instr(ops[k], 1'b0, nb * 3, cyc, ent);
        chk(int'(ent) == ent_e[k], $sformatf("opcode %h dispatched to %0d", ops[k], ent));
        chk(cyc == 4 + len_e[k] + (1 + nmem[k]) * nb * 3,
            $sformatf("opcode %h took %0d cycles with %0d busy", ops[k], cyc, nb * 3));
      end
    // branches with zero set: BEQZ taken (5), BNEZ falls through (2)
    run_instr(OPC_BEQZ, 1'b1, 0, cyc, ent);
    chk(cyc == 4 + 5, "BEQZ taken length");
    run_instr(OPC_BNEZ, 1'b1, 0, cyc, ent);
    chk(cyc == 4 + 2, "BNEZ not-taken length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
