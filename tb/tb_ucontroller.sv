// tb_ucontroller: checks the sequencing of the microcoded controller.  With
// the opcode, zero? and busy driven by the testbench it follows the uPC
// through the fetch sequence (holding in the spin state while busy), the
// dispatch to each op-group, the feqz / fnez branches both ways and the jump
// back to fetch, and counts the cycles of each instruction against the
// lengths of the microprogram tables.
module tb_ucontroller;
  import ucode_pkg::*;
  logic    clk = 0, rst = 1;
  opcode_t opcode = 0;
  logic    zero = 0, busy = 0;
  ctrl_t   ctrl;
  uaddr_t  upc;
  ujump_e  jump;
  int checks = 0, failures = 0;

  ucontroller dut (.*);

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
