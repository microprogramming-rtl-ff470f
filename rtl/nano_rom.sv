// nano_rom: the nanoinstruction store of the nanocoded controller variant.
//
// Holds each distinct datapath control word of the microprogram once.  The
// microprogram refers to a control word by its 5-bit nanoaddress instead of
// carrying the 18 control bits itself, which pays off because the same
// transfers recur in many op-groups (A <- Reg[rs] opens nine of them).  The
// 28 words below are all the transfers the microprogram uses; unused
// nanoaddresses read as a no-operation.  Reading is combinational.
//
// Two-level control (microcode ROM giving a nanoaddress, nanoinstruction ROM
// giving the control signals) follows the lecture's nanocoding scheme; the
// word list and its order are this design's.
module nano_rom
  import ucode_pkg::*;
(
  input  nanoaddr_t addr,
  output ctrl_t     ctrl
);
  always_comb begin
    unique case (addr)
      NA_NOP:        ctrl = CTRL_NOP;
      NA_MA_PC:      ctrl = xfer(S_REG, D_MA,  RS_PC);
      NA_IR_MEM:     ctrl = xfer(S_MEM, D_IR);
      NA_A_PC:       ctrl = xfer(S_REG, D_A,   RS_PC);
      NA_PC_INC4:    ctrl = xfer(S_ALU, D_REG, RS_PC,   OS_INC4);
      NA_A_RS:       ctrl = xfer(S_REG, D_A,   RS_RS);
      NA_B_RT:       ctrl = xfer(S_REG, D_B,   RS_RT);
      NA_RD_FUNC:    ctrl = xfer(S_ALU, D_REG, RS_RD,   OS_FUNC);
      NA_B_SEXT:     ctrl = xfer(S_IMM, D_B,   RS_PC,   OS_FUNC, EX_SEXT16);
      NA_RT_OP:      ctrl = xfer(S_ALU, D_REG, RS_RT,   OS_OPC);
      NA_B_UEXT:     ctrl = xfer(S_IMM, D_B,   RS_PC,   OS_FUNC, EX_UEXT16);
      NA_MA_AB:      ctrl = xfer(S_ALU, D_MA,  RS_PC,   OS_ADD);
      NA_RT_MEM:     ctrl = xfer(S_MEM, D_REG, RS_RT);
      NA_MEM_RT:     ctrl = xfer(S_REG, D_MEM, RS_RT);
      NA_B_BOFF:     ctrl = xfer(S_IMM, D_B,   RS_PC,   OS_FUNC, EX_SEXT16_SH2);
      NA_PC_AB:      ctrl = xfer(S_ALU, D_REG, RS_PC,   OS_ADD);
      NA_B_IR:       ctrl = xfer(S_IMM, D_B,   RS_PC,   OS_FUNC, EX_IR);
      NA_PC_JTARG:   ctrl = xfer(S_ALU, D_REG, RS_PC,   OS_JTARG);
      NA_PC_A:       ctrl = xfer(S_ALU, D_REG, RS_PC,   OS_PASSA);
      NA_LINK_A:     ctrl = xfer(S_ALU, D_REG, RS_LINK, OS_PASSA);
      NA_B_RS:       ctrl = xfer(S_REG, D_B,   RS_RS);
      NA_PC_B:       ctrl = xfer(S_ALU, D_REG, RS_PC,   OS_PASSB);
      NA_MA_RS:      ctrl = xfer(S_REG, D_MA,  RS_RS);
      NA_A_MEM:      ctrl = xfer(S_MEM, D_A);
      NA_MA_RT:      ctrl = xfer(S_REG, D_MA,  RS_RT);
      NA_B_MEM:      ctrl = xfer(S_MEM, D_B);
      NA_MA_RD:      ctrl = xfer(S_REG, D_MA,  RS_RD);
      NA_MEM_FUNC:   ctrl = xfer(S_ALU, D_MEM, RS_PC,   OS_FUNC);
      default:       ctrl = CTRL_NOP;
    endcase
  end
endmodule
