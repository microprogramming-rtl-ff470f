// ucode_rom: the control store of the microcoded MIPS controller.
//
// A 64-word read-only memory addressed by the microprogram counter.  Each word
// is one microinstruction: the datapath control word (one register transfer
// over the bus) and a uJumpType telling the jump logic how to form the next
// microaddress.  Reading is combinational.  The words are laid out op-group by
// op-group, starting at the addresses named in ucode_pkg:
//
//   fetch   MA<-PC; IR<-Mem (spin); A<-PC; PC<-A+4 (dispatch)
//   ALU     A<-Reg[rs]; B<-Reg[rt]; Reg[rd]<-func(A,B) (fetch)
//   ALUi    A<-Reg[rs]; B<-sExt16(Imm); Reg[rt]<-Op(A,B) (fetch)
//   ALUiU   as ALUi with B<-uExt16(Imm)
//   LW      A<-Reg[rs]; B<-sExt16(Imm); MA<-A+B; Reg[rt]<-Mem (spin); (fetch)
//   SW      A<-Reg[rs]; B<-sExt16(Imm); MA<-A+B; Mem<-Reg[rt] (spin); (fetch)
//   BEQZ    A<-Reg[rs]; (fnez); A<-PC; B<-sExt16(Imm<<2); PC<-A+B (fetch)
//   BNEZ    as BEQZ with feqz
//   J       A<-PC; B<-IR; PC<-JumpTarg(A,B) (fetch)
//   JR      A<-Reg[rs]; PC<-A (fetch)
//   JAL     A<-PC; Reg[31]<-A; B<-IR; PC<-JumpTarg(A,B) (fetch)
//   JALR    A<-PC; B<-Reg[rs]; Reg[31]<-A; PC<-B (fetch)
//   ALUMM   MA<-Reg[rs]; A<-Mem (spin); MA<-Reg[rt]; B<-Mem (spin);
//           MA<-Reg[rd]; Mem<-func(A,B) (spin); (fetch)
//   ALUMS   MA<-Reg[rs]; A<-Mem (spin); B<-Reg[rt]; Reg[rd]<-func(A,B) (fetch)
//   ALUMD   A<-Reg[rs]; B<-Reg[rt]; MA<-Reg[rd]; Mem<-func(A,B) (spin); (fetch)
//
// Control words are built with ucode_pkg::xfer.  62 of the 64 words are used.
//
// The sequences up to ALUMM are those of the lecture's second controller.
// The lecture defines ALUMS and ALUMD, the register-memory ALU operations,
// but gives no microcode for them; their sequences are written here in the
// same style as ALUMM.  Other own choices:
//   - the addresses;
//   - a separate zero-extending ALUi group (the first controller picks sExt
//     or uExt by opcode, the second lists only sExt);
//   - the immediate ALU result going to rt (the instruction format and the
//     first fragment say rt, the controller table says rd);
//   - unused words hold a no-operation that returns to fetch.
module ucode_rom
  import ucode_pkg::*;
(
  input  uaddr_t addr,
  output uinst_t data
);
  function automatic uinst_t ui(ctrl_t c, ujump_e j);
    uinst_t u;
    u.ctrl = c;
    u.jump = j;
    return u;
  endfunction

  localparam ctrl_t NOP = CTRL_NOP;

  always_comb begin
    unique case (addr)
      // instruction fetch
      6'd0:  data = ui(xfer(S_REG, D_MA, RS_PC),                         J_NEXT);
      6'd1:  data = ui(xfer(S_MEM, D_IR),                                J_SPIN);
      6'd2:  data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd3:  data = ui(xfer(S_ALU, D_REG, RS_PC, OS_INC4),               J_DISPATCH);
      // ALU: rd <- rs func rt
      6'd4:  data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd5:  data = ui(xfer(S_REG, D_B, RS_RT),                          J_NEXT);
      6'd6:  data = ui(xfer(S_ALU, D_REG, RS_RD, OS_FUNC),               J_FETCH);
      // ALUi, sign-extended immediate
      6'd7:  data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd8:  data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16),      J_NEXT);
      6'd9:  data = ui(xfer(S_ALU, D_REG, RS_RT, OS_OPC),                J_FETCH);
      // ALUi, zero-extended immediate
      6'd10: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd11: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_UEXT16),      J_NEXT);
      6'd12: data = ui(xfer(S_ALU, D_REG, RS_RT, OS_OPC),                J_FETCH);
      // LW
      6'd13: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd14: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16),      J_NEXT);
      6'd15: data = ui(xfer(S_ALU, D_MA, RS_PC, OS_ADD),                 J_NEXT);
      6'd16: data = ui(xfer(S_MEM, D_REG, RS_RT),                        J_SPIN);
      6'd17: data = ui(NOP,                                              J_FETCH);
      // SW
      6'd18: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd19: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16),      J_NEXT);
      6'd20: data = ui(xfer(S_ALU, D_MA, RS_PC, OS_ADD),                 J_NEXT);
      6'd21: data = ui(xfer(S_REG, D_MEM, RS_RT),                        J_SPIN);
      6'd22: data = ui(NOP,                                              J_FETCH);
      // BEQZ
      6'd23: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd24: data = ui(NOP,                                              J_FNEZ);
      6'd25: data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd26: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16_SH2),  J_NEXT);
      6'd27: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_ADD),                J_FETCH);
      // BNEZ
      6'd28: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd29: data = ui(NOP,                                              J_FEQZ);
      6'd30: data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd31: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16_SH2),  J_NEXT);
      6'd32: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_ADD),                J_FETCH);
      // J
      6'd33: data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd34: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR),          J_NEXT);
      6'd35: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_JTARG),              J_FETCH);
      // JR
      6'd36: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd37: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_PASSA),              J_FETCH);
      // JAL
      6'd38: data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd39: data = ui(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA),            J_NEXT);
      6'd40: data = ui(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR),          J_NEXT);
      6'd41: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_JTARG),              J_FETCH);
      // JALR
      6'd42: data = ui(xfer(S_REG, D_A, RS_PC),                          J_NEXT);
      6'd43: data = ui(xfer(S_REG, D_B, RS_RS),                          J_NEXT);
      6'd44: data = ui(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA),            J_NEXT);
      6'd45: data = ui(xfer(S_ALU, D_REG, RS_PC, OS_PASSB),              J_FETCH);
      // ALUMM: M[(rd)] <- M[(rs)] func M[(rt)]
      6'd46: data = ui(xfer(S_REG, D_MA, RS_RS),                         J_NEXT);
      6'd47: data = ui(xfer(S_MEM, D_A),                                 J_SPIN);
      6'd48: data = ui(xfer(S_REG, D_MA, RS_RT),                         J_NEXT);
      6'd49: data = ui(xfer(S_MEM, D_B),                                 J_SPIN);
      6'd50: data = ui(xfer(S_REG, D_MA, RS_RD),                         J_NEXT);
      6'd51: data = ui(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC),               J_SPIN);
      6'd52: data = ui(NOP,                                              J_FETCH);
      // ALUMS: rd <- M[(rs)] func (rt)
      6'd53: data = ui(xfer(S_REG, D_MA, RS_RS),                         J_NEXT);
      6'd54: data = ui(xfer(S_MEM, D_A),                                 J_SPIN);
      6'd55: data = ui(xfer(S_REG, D_B, RS_RT),                          J_NEXT);
      6'd56: data = ui(xfer(S_ALU, D_REG, RS_RD, OS_FUNC),               J_FETCH);
      // ALUMD: M[(rd)] <- (rs) func (rt)
      6'd57: data = ui(xfer(S_REG, D_A, RS_RS),                          J_NEXT);
      6'd58: data = ui(xfer(S_REG, D_B, RS_RT),                          J_NEXT);
      6'd59: data = ui(xfer(S_REG, D_MA, RS_RD),                         J_NEXT);
      6'd60: data = ui(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC),               J_SPIN);
      6'd61: data = ui(NOP,                                              J_FETCH);
      default: data = ui(NOP,                                            J_FETCH);
    endcase
  end
endmodule
