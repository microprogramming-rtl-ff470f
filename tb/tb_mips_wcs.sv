// tb_mips_wcs: end-to-end test of the microcoded MIPS machine built with the
// writable control store (CONTROLLER = CTL_WCS), other parameters at their
// defaults.
//
// Phase 1 boots the machine.  While reset is held, the testbench copies a
// boot image of the microprogram into the control store, one word per clock,
// through the wcs_* port.  The image is read from a ucode_rom instance.  It
// then runs the program, model and checks of the default machine's test
// (every instruction group, memory image, cycle count, mechanism counts).
// With the standard microprogram loaded, results and timing must match the
// ROM-based machine exactly.
//
// Phase 2 patches the microcode.  With the machine held in reset, the last
// word of the ALU group is rewritten to use the fixed A+B operation instead
// of the func field.  A short program with a SUB must then store the sum
// (20 + 7 = 27) instead of the difference (13).  The instruction's behaviour
// changes with no change to the hardware.
module tb_mips_wcs;
  import ucode_pkg::*;

  localparam int unsigned DEPTH = 1024;   // defaults of mips_ucoded
  localparam int unsigned L     = 10;

  logic        clk = 1'b0, rst = 1'b1;
  logic        host_we = 1'b0;
  logic [31:0] host_addr = '0, host_wdata = '0, host_rdata;
  logic [31:0] pc, ir;
  uaddr_t      upc;
  ujump_e      jump;
  logic        busy, zero;
  logic        wcs_we = 1'b0;       // control store write port
  uaddr_t      wcs_addr = '0;
  uinst_t      wcs_wdata = '0;

  mips_ucoded #(.CONTROLLER(CTL_WCS)) dut (.*);

  // boot image of the microprogram
  uaddr_t img_addr = '0;
  uinst_t img_word;
  ucode_rom u_image (.addr(img_addr), .data(img_word));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ------------------------------------------------------------ assembler
  logic [31:0] prog [DEPTH];
  function automatic logic [31:0] R(func_t fn, int rd, int rs, int rt);
    return {OPC_ALU, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] I(opcode_t op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] JT(opcode_t op, int word_idx);
    return {op, 26'(word_idx)};
  endfunction
  function automatic logic [31:0] MM(opcode_t op, func_t fn, int rd, int rs, int rt);
    return {op, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  // branch offset, in words, from the instruction after the branch
  function automatic int off(int from_idx, int to_idx);
    return to_idx - (from_idx + 1);
  endfunction

  int halt_idx;

  task automatic build_program();
    int p = 0;
    int loop_idx, skip_idx, fn1_idx, fn2_idx, over_idx;
    for (int i = 0; i < int'(DEPTH); i++) prog[i] = 32'd0;
    // data words
    prog[32'h180 >> 2] = 32'd1000;
    prog[32'h184 >> 2] = 32'hFFFF_FFF0;
    prog[p++] = I(OPC_ADDI,  1, 0, 5);
    prog[p++] = I(OPC_ADDI,  2, 0, -3);
    prog[p++] = R(FN_ADD,  3, 1, 2);
    prog[p++] = R(FN_SUB,  4, 1, 2);
    prog[p++] = I(OPC_ORI,   5, 0, 16'h8000);
    prog[p++] = I(OPC_LUI,   6, 0, 16'h1234);
    prog[p++] = R(FN_SLT,  7, 2, 1);
    prog[p++] = I(OPC_SLTIU, 8, 2, 5);
    prog[p++] = R(FN_SRAV, 19, 2, 1);
    prog[p++] = R(FN_NOR,  20, 1, 6);
    prog[p++] = I(OPC_XORI, 21, 2, 16'hF0F0);
    prog[p++] = I(OPC_SW,    3, 0, 32'h200);
    prog[p++] = I(OPC_SW,    4, 0, 32'h204);
    prog[p++] = I(OPC_LW,    9, 0, 32'h180);
    prog[p++] = I(OPC_ADDI, 10, 0, 32'h208);
    prog[p++] = I(OPC_ADDI, 11, 0, 32'h180);
    prog[p++] = I(OPC_ADDI, 12, 0, 32'h184);
    prog[p++] = MM(OPC_ALUMM, FN_ADD, 10, 11, 12);   // M[208] = 1000 + (-16)
    prog[p++] = MM(OPC_ALUMS, FN_SUB, 23, 11, 2);    // r23 = 1000 - (-3)
    prog[p++] = I(OPC_ADDI, 24, 0, 32'h20C);
    prog[p++] = MM(OPC_ALUMD, FN_XOR, 24, 1, 6);     // M[20C] = 5 ^ 1234_0000
    prog[p++] = {6'h3F, 26'h155};                // opcode without a group
    prog[p++] = I(OPC_ADDI, 13, 0, 3);
    loop_idx = p;
    prog[p++] = I(OPC_ADDI, 14, 14, 7);
    prog[p++] = I(OPC_ADDI, 13, 13, -1);
    prog[p] = I(OPC_BNEZ, 0, 13, off(p, loop_idx)); p++;
    skip_idx = p + 2;
    prog[p] = I(OPC_BEQZ, 0, 0, off(p, skip_idx)); p++;   // taken
    prog[p++] = I(OPC_ADDI, 15, 0, 99);                   // skipped
    prog[p] = I(OPC_BEQZ, 0, 1, 5); p++;                  // not taken
    prog[p] = I(OPC_BNEZ, 0, 0, 5); p++;                  // not taken
    fn1_idx = p + 5;
    prog[p++] = JT(OPC_JAL, fn1_idx);
    prog[p++] = I(OPC_ADDI, 18, 0, 0);                    // placeholder, patched
    fn2_idx = p + 5;
    prog[p - 1] = I(OPC_ADDI, 18, 0, fn2_idx * 4);
    prog[p++] = I(OPC_JALR, 0, 18, 0);
    over_idx = p + 1 + 6;
    prog[p++] = JT(OPC_J, over_idx);
    prog[p++] = I(OPC_ADDI, 22, 0, 1);                    // filler
    // fn1 at fn1_idx
    p = fn1_idx;
    prog[p++] = R(FN_ADD, 16, 31, 0);
    prog[p++] = I(OPC_JR, 0, 31, 0);
    prog[p++] = I(OPC_ADDI, 22, 0, 2);                    // never reached
    // fn2 at fn2_idx
    p = fn2_idx;
    prog[p++] = R(FN_ADD, 17, 31, 0);
    prog[p++] = I(OPC_JR, 0, 31, 0);
    // store registers
    p = over_idx;
    for (int r = 1; r < 32; r++) prog[p++] = I(OPC_SW, r, 0, 32'h300 + 4 * r);
    halt_idx = p;
    prog[p++] = JT(OPC_J, halt_idx);
  endtask

  // ------------------------------------------------------ reference model
  logic [31:0] rm [DEPTH];
  longint      ref_cycles;

  task automatic run_model();
    logic [31:0] r [32];
    logic [31:0] mpc, ins, a, b, y;
    int steps = 0;
    for (int i = 0; i < 32; i++) r[i] = 0;
    for (int i = 0; i < int'(DEPTH); i++) rm[i] = prog[i];
    mpc = 0;
    ref_cycles = 0;
    while (mpc != 32'(halt_idx * 4) && steps < 10000) begin
      logic [5:0] op, fn;
      logic [4:0] rs, rt, rd;
      logic [31:0] se, ze, npc;
      ins = rm[mpc[11:2]];
      op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; fn = ins[5:0];
      se = {{16{ins[15]}}, ins[15:0]};
      ze = {16'd0, ins[15:0]};
      npc = mpc + 4;
      ref_cycles += 4 + L;
      a = r[rs]; b = r[rt];
      case (op)
        6'h00, 6'h3C, 6'h3D, 6'h3E: begin
          if (op == 6'h3C || op == 6'h3D) a = rm[r[rs][11:2]];
          if (op == 6'h3C) b = rm[r[rt][11:2]];
          case (fn)
            6'h20, 6'h21: y = a + b;
            6'h22, 6'h23: y = a - b;
            6'h24: y = a & b;
            6'h25: y = a | b;
            6'h26: y = a ^ b;
            6'h27: y = ~(a | b);
            6'h2A: y = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2B: y = (a < b) ? 1 : 0;
            6'h04: y = a << b[4:0];
            6'h06: y = a >> b[4:0];
            6'h07: y = $unsigned($signed(a) >>> b[4:0]);
            default: y = a + b;
          endcase
          case (op)
            6'h00: begin r[rd] = y; ref_cycles += 3; end
            6'h3C: begin rm[r[rd][11:2]] = y; ref_cycles += 7 + 3 * L; end
            6'h3D: begin r[rd] = y; ref_cycles += 4 + L; end
            default: begin rm[r[rd][11:2]] = y; ref_cycles += 5 + L; end
          endcase
        end
        6'h08, 6'h09: begin r[rt] = a + se; ref_cycles += 3; end
        6'h0A: begin r[rt] = ($signed(a) < $signed(se)) ? 1 : 0; ref_cycles += 3; end
        6'h0B: begin r[rt] = (a < se) ? 1 : 0; ref_cycles += 3; end
        6'h0C: begin r[rt] = a & ze; ref_cycles += 3; end
        6'h0D: begin r[rt] = a | ze; ref_cycles += 3; end
        6'h0E: begin r[rt] = a ^ ze; ref_cycles += 3; end
        6'h0F: begin r[rt] = {ins[15:0], 16'd0}; ref_cycles += 3; end
        6'h23: begin r[rt] = rm[(a + se) >> 2]; ref_cycles += 5 + L; end
        6'h2B: begin rm[(a + se) >> 2] = b; ref_cycles += 5 + L; end
        6'h04: begin
          if (a == 0) begin npc = npc + (se << 2); ref_cycles += 5; end else ref_cycles += 2;
        end
        6'h05: begin
          if (a != 0) begin npc = npc + (se << 2); ref_cycles += 5; end else ref_cycles += 2;
        end
        6'h02: begin npc = {npc[31:28], ins[25:0], 2'b00}; ref_cycles += 3; end
        6'h03: begin r[31] = npc; npc = {npc[31:28], ins[25:0], 2'b00}; ref_cycles += 4; end
        6'h12: begin npc = a; ref_cycles += 2; end
        6'h13: begin r[31] = npc; npc = a; ref_cycles += 4; end
        default: ;
      endcase
      r[0] = 0;
      mpc = npc;
      steps++;
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_spin_wait = 0, n_dispatch = 0, n_fetch_jump = 0;
  int n_feqz_taken = 0, n_feqz_fall = 0, n_fnez_taken = 0, n_fnez_fall = 0;
  bit after_dispatch = 1'b0;
  int n_group [15];
  uaddr_t group_addr [15] = '{UA_ALU, UA_ALUI, UA_ALUIU, UA_LW, UA_SW, UA_BEQZ, UA_BNEZ,
                              UA_J, UA_JR, UA_JAL, UA_JALR, UA_ALUMM, UA_ALUMS, UA_ALUMD,
                              UA_FETCH0};
  string  group_name [15] = '{"ALU", "ALUi", "ALUiU", "LW", "SW", "BEQZ", "BNEZ",
                              "J", "JR", "JAL", "JALR", "ALUMM", "ALUMS", "ALUMD",
                              "no-group"};

  bit running = 1'b1;   // cleared once the halt loop is reached

  always @(posedge clk) if (!rst && running) begin
    cycles++;
    if (jump == J_SPIN && busy) n_spin_wait++;
    if (jump == J_FETCH) n_fetch_jump++;
    if (jump == J_FEQZ) begin if (zero) n_feqz_taken++; else n_feqz_fall++; end
    if (jump == J_FNEZ) begin if (!zero) n_fnez_taken++; else n_fnez_fall++; end
    // the uPC after a dispatch is the op-group entry (sampled one edge later)
    if (after_dispatch)
      for (int g = 0; g < 15; g++)
        if (upc == group_addr[g]) n_group[g]++;
    after_dispatch = (jump == J_DISPATCH);
    if (jump == J_DISPATCH) n_dispatch++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 15; g++) n_group[g] = 0;
    build_program();
    run_model();
    // boot: copy the microprogram into the control store, during reset
    repeat (2) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      img_addr = uaddr_t'(i);
      #1;
      wcs_we <= 1'b1; wcs_addr <= uaddr_t'(i); wcs_wdata <= img_word;
      @(posedge clk);
    end
    wcs_we <= 1'b0;
    // load the image through the direct port, during reset
    for (int i = 0; i < int'(DEPTH); i++) begin
      host_we <= 1'b1; host_addr <= i; host_wdata <= prog[i];
      @(posedge clk);
    end
    host_we <= 1'b0;
    @(posedge clk);
    rst <= 1'b0;
    // run until the fetch of the halt instruction begins
    @(negedge clk);
    while (!(upc == UA_FETCH0 && pc == 32'(halt_idx * 4))) @(negedge clk);
    running = 1'b0;
    check(longint'(cycles) == ref_cycles,
          $sformatf("cycle count %0d, model %0d", cycles, ref_cycles));
    $display("cycles to reach halt: %0d (model %0d)", cycles, ref_cycles);
    for (int i = 0; i < int'(DEPTH); i++) begin
      host_addr <= i;
      @(negedge clk);
      if (host_rdata != rm[i]) $display("mem[%0d] = %h, model %h", i, host_rdata, rm[i]);
      check(host_rdata == rm[i], $sformatf("memory word %0d", i));
    end
    // a few spot values worked out by hand
    check(rm[32'h208 >> 2] == 32'd984, "model ALUMM result");
    check(rm[(32'h300 >> 2) + 23] == 32'd1003, "model ALUMS result r23");
    check(rm[32'h20C >> 2] == 32'h1234_0005, "model ALUMD result");
    check(rm[(32'h300 >> 2) + 14] == 32'd21, "model loop result r14");
    // mechanisms
    check(n_spin_wait > 0, "spin while memory busy never happened");
    check(n_dispatch > 0, "dispatch never happened");
    check(n_fetch_jump > 0, "fetch jump never happened");
    check(n_feqz_taken > 0 && n_feqz_fall > 0, "feqz not seen both ways");
    check(n_fnez_taken > 0 && n_fnez_fall > 0, "fnez not seen both ways");
    for (int g = 0; g < 15; g++) begin
      check(n_group[g] > 0, $sformatf("op-group %s never dispatched", group_name[g]));
      $display("op-group %-8s dispatched %0d times", group_name[g], n_group[g]);
    end
    $display("spin-wait cycles %0d, dispatches %0d, fetch jumps %0d, feqz %0d/%0d, fnez %0d/%0d",
             n_spin_wait, n_dispatch, n_fetch_jump, n_feqz_taken, n_feqz_fall,
             n_fnez_taken, n_fnez_fall);
    patch_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase 2: patch the ALU group so that every R-type ALU operation adds.
  task automatic patch_test();
    uinst_t patched;
    logic [31:0] prog2 [6];
    int n = 0, halt2 = 4;
    prog2[0] = I(OPC_ADDI, 1, 0, 20);
    prog2[1] = I(OPC_ADDI, 2, 0, 7);
    prog2[2] = R(FN_SUB, 3, 1, 2);
    prog2[3] = I(OPC_SW, 3, 0, 32'h200);
    prog2[4] = JT(OPC_J, halt2);
    prog2[5] = 32'd0;
    patched.ctrl = xfer(S_ALU, D_REG, RS_RD, OS_ADD);
    patched.jump = J_FETCH;
    @(negedge clk);
    rst <= 1'b1;
    @(negedge clk);
    wcs_we <= 1'b1; wcs_addr <= UA_ALU + 6'd2; wcs_wdata <= patched;
    for (int i = 0; i < 6; i++) begin
      host_we <= 1'b1; host_addr <= i; host_wdata <= prog2[i];
      @(negedge clk);
      wcs_we <= 1'b0;
    end
    host_we <= 1'b0; host_addr <= 32'h200 >> 2; host_wdata <= 32'd0;
    host_we <= 1'b1;
    @(negedge clk);
    host_we <= 1'b0;
    rst <= 1'b0;
    @(negedge clk);
    while (!(upc == UA_FETCH0 && pc == 32'(halt2 * 4)) && n < 2000) begin
      @(negedge clk);
      n++;
    end
    check(n < 2000, "patched program did not reach its halt loop");
    host_addr <= 32'h200 >> 2;
    @(negedge clk);
    check(host_rdata == 32'd27,
          $sformatf("patched SUB stored %0d, expected 27 (20 + 7)", host_rdata));
    $display("patched microcode: SUB 20, 7 stored %0d", host_rdata);
  endtask
endmodule
