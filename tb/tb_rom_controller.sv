// tb_rom_controller: checks the unencoded (single-table) controller.
//
// The testbench plays the datapath and the memory.  It drives the opcode and
// zero? and models the memory's busy flag: busy stays high for the first
// nbusy cycles of every access, that is, while enMem is asserted.  For each
// instruction it runs from fetch0 back to fetch0 and compares every control
// word the controller issues in a non-busy cycle with a hand-written list of
// the transfers that instruction must perform:
//   - the four fetch transfers;
//   - the instruction's own transfers.
// In busy cycles the controller must keep the memory enabled and must not
// load IR, A, B, MA or a register with the bus.  The testbench also checks
// the cycle count (4 + transfers of the group + one per busy cycle) and the
// state after reset.  Every group is run at three busy lengths, including
// both ALUi extensions and both outcomes of BEQZ and BNEZ.
module tb_rom_controller;
  import ucode_pkg::*;
  logic       clk = 0, rst = 1;
  opcode_t    opcode = 0;
  logic       zero = 0, busy = 0;
  ctrl_t      ctrl;
  logic [5:0] state;
  int checks = 0, failures = 0;

  rom_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected transfers of one instruction
  ctrl_t exp_q [$];

  task automatic expect_fetch();
    exp_q.delete();
    exp_q.push_back(xfer(S_REG, D_MA, RS_PC));
    exp_q.push_back(xfer(S_MEM, D_IR));
    exp_q.push_back(xfer(S_REG, D_A, RS_PC));
    exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_INC4));
  endtask

  task automatic expect_body(opcode_t op, bit z, output int nmem);
    bit taken;
    nmem = 0;
    case (op)
      OPC_ALU: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        exp_q.push_back(xfer(S_REG, D_B, RS_RT));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_RD, OS_FUNC));
      end
      OPC_ADDI, OPC_SLTIU, OPC_ORI, OPC_LUI: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        exp_q.push_back(xfer(S_IMM, D_B, RS_PC, OS_FUNC,
                             (op == OPC_ADDI || op == OPC_SLTIU) ? EX_SEXT16 : EX_UEXT16));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_RT, OS_OPC));
      end
      OPC_LW, OPC_SW: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        exp_q.push_back(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16));
        exp_q.push_back(xfer(S_ALU, D_MA, RS_PC, OS_ADD));
        exp_q.push_back(op == OPC_LW ? xfer(S_MEM, D_REG, RS_RT) : xfer(S_REG, D_MEM, RS_RT));
        nmem = 1;
      end
      OPC_BEQZ, OPC_BNEZ: begin
        taken = (op == OPC_BEQZ) ? z : !z;
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        if (taken) begin
          exp_q.push_back(xfer(S_REG, D_A, RS_PC));
          exp_q.push_back(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16_SH2));
          exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_ADD));
        end else
          exp_q.push_back(CTRL_NOP);
      end
      OPC_J: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_PC));
        exp_q.push_back(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_JTARG));
      end
      OPC_JR: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_PASSA));
      end
      OPC_JAL: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_PC));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA));
        exp_q.push_back(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_JTARG));
      end
      OPC_JALR: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_PC));
        exp_q.push_back(xfer(S_REG, D_B, RS_RS));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_PC, OS_PASSB));
      end
      OPC_ALUMM: begin
        exp_q.push_back(xfer(S_REG, D_MA, RS_RS));
        exp_q.push_back(xfer(S_MEM, D_A));
        exp_q.push_back(xfer(S_REG, D_MA, RS_RT));
        exp_q.push_back(xfer(S_MEM, D_B));
        exp_q.push_back(xfer(S_REG, D_MA, RS_RD));
        exp_q.push_back(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC));
        nmem = 3;
      end
      OPC_ALUMS: begin
        exp_q.push_back(xfer(S_REG, D_MA, RS_RS));
        exp_q.push_back(xfer(S_MEM, D_A));
        exp_q.push_back(xfer(S_REG, D_B, RS_RT));
        exp_q.push_back(xfer(S_ALU, D_REG, RS_RD, OS_FUNC));
        nmem = 1;
      end
      OPC_ALUMD: begin
        exp_q.push_back(xfer(S_REG, D_A, RS_RS));
        exp_q.push_back(xfer(S_REG, D_B, RS_RT));
        exp_q.push_back(xfer(S_REG, D_MA, RS_RD));
        exp_q.push_back(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC));
        nmem = 1;
      end
      default: ;  // no group: straight back to fetch
    endcase
  endtask

  // Run one instruction from fetch0 to fetch0 with nbusy busy cycles per
  // memory access (the fetch included).
  task automatic run_instr(opcode_t op, bit z, int nbusy);
    int nmem, cyc = 0, idx = 0, held = 0, ntrans;
    bit bad = 0;
    expect_fetch();
    expect_body(op, z, nmem);
    ntrans = exp_q.size();
    chk(state == 6'd0, $sformatf("op %h starts at fetch0", op));
    do begin
      opcode = op; zero = z;
      busy = 1'b0;
      #1;
      busy = ctrl.enMem && (held < nbusy);
      #1;
      if (busy) begin
        held++;
        if (!ctrl.enMem || ctrl.ldIR || ctrl.ldA || ctrl.ldB || ctrl.ldMA ||
            (ctrl.RegWrt && !ctrl.MemWrt)) bad = 1;
      end else begin
        held = 0;
        if (idx >= ntrans || ctrl != exp_q[idx]) begin
          bad = 1;
          $display("op %h transfer %0d: got %h", op, idx, ctrl);
        end
        idx++;
      end
      @(negedge clk);
      cyc++;
    end while (state != 6'd0 && cyc < 200);
    busy = 0;
    chk(!bad, $sformatf("op %h zero %0d busy %0d: transfers", op, z, nbusy));
    chk(idx == ntrans, $sformatf("op %h: %0d transfers, expected %0d", op, idx, ntrans));
    chk(cyc == ntrans + (1 + nmem) * nbusy,
        $sformatf("op %h zero %0d busy %0d: %0d cycles", op, z, nbusy, cyc));
  endtask

  initial begin
    opcode_t ops [16] = '{OPC_ALU, OPC_ADDI, OPC_SLTIU, OPC_ORI, OPC_LUI, OPC_LW, OPC_SW,
                          OPC_BEQZ, OPC_BNEZ, OPC_J, OPC_JR, OPC_JAL, OPC_JALR, OPC_ALUMM,
                          OPC_ALUMS, OPC_ALUMD};
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    chk(state == 6'd0, "reset puts the state at fetch0");
    for (int nb = 0; nb < 3; nb++) begin
      for (int k = 0; k < 16; k++)
        for (int z = 0; z < 2; z++)
          run_instr(ops[k], z[0], nb * 4);
      run_instr(6'h3F, 1'b0, nb * 4);
    end
    // a reset in mid-instruction returns to fetch0
    opcode = OPC_ALUMM;
    repeat (6) @(negedge clk);
    rst = 1;
    @(negedge clk);
    chk(state == 6'd0, "synchronous reset from a group state");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
