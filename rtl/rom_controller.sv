// rom_controller: the unencoded ("first attempt") controller of the
// microcoded MIPS.
//
// A plain finite-state machine whose whole behaviour sits in one read-only
// table.  The table is addressed by the concatenation of the opcode (6 bits),
// zero? (1), busy (1) and the present state (6), 14 address bits in all.
// Each of its 2^14 words holds the 18 datapath control signals and the next
// state (6 bits), 24 bits per word.  There is no sequencer: the next state is
// stored explicitly in every word, and waiting for memory, testing zero? and
// branching on the opcode are all done by giving the same state different
// words for different input values.  The table is written as a function of
// its address; a synthesis tool may reduce it to logic.
//
// Interface and timing are those of ucontroller: the control word is
// combinational from the state register and the status inputs, the state
// register loads the next state at each rising clock edge, and a synchronous
// active-high reset puts it at fetch0.  state is brought out for observation.
//
// The sequences follow the lecture's ROM worksheet for its first controller.
//   fetch    MA<-PC; IR<-Mem (stay while busy); A<-PC; PC<-A+4, next state
//            chosen by the opcode
//   ALUi     one group; its second state loads B with sExt or uExt of the
//            immediate depending on the opcode
//   beqz     A<-Reg[rs]; if the branch is taken A<-PC, else back to fetch0;
//            B<-sExt(Imm)<<2; PC<-A+B
//   LW, SW and the memory ALU groups (ALUMM, ALUMS, ALUMD): a memory
//            state is held while busy, and the transfer completes in the
//            cycle busy is low, then goes on directly
// The groups the worksheet elides ("...") use the transfers of the encoded
// microprogram in ucode_rom.
// With 49 states the state field needs 6 bits, as the lecture's estimate of
// about 42 states does.  Own choices:
//   - state numbering;
//   - BEQZ and BNEZ share states, the taken condition read from the opcode;
//   - the branch offset is shifted by two (the worksheet row prints sExt16,
//     the fragment Imm << 2);
//   - immediate results go to rt;
//   - while busy a read state drives only the memory enable and loads
//     nothing, a write state repeats its whole word;
//   - an opcode with no group returns to fetch0.
// A taken branch takes 4 cycles here against 5 in the encoded controller,
// and the memory states end one cycle sooner, since no word is needed only
// to jump back to fetch.
module rom_controller
  import ucode_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  opcode_t    opcode,
  input  logic       zero,
  input  logic       busy,
  output ctrl_t      ctrl,
  output logic [5:0] state
);
  typedef logic [5:0] state_t;

  localparam state_t FETCH0 = 6'd0,  FETCH1 = 6'd1,  FETCH2 = 6'd2,  FETCH3 = 6'd3;
  localparam state_t ALU0   = 6'd4,  ALU1   = 6'd5,  ALU2   = 6'd6;
  localparam state_t ALUI0  = 6'd7,  ALUI1  = 6'd8,  ALUI2  = 6'd9;
  localparam state_t LW0    = 6'd10, LW1    = 6'd11, LW2    = 6'd12, LW3 = 6'd13;
  localparam state_t SW0    = 6'd14, SW1    = 6'd15, SW2    = 6'd16, SW3 = 6'd17;
  localparam state_t BZ0    = 6'd18, BZ1    = 6'd19, BZ2    = 6'd20, BZ3 = 6'd21;
  localparam state_t J0     = 6'd22, J1     = 6'd23, J2     = 6'd24;
  localparam state_t JR0    = 6'd25, JR1    = 6'd26;
  localparam state_t JAL0   = 6'd27, JAL1   = 6'd28, JAL2   = 6'd29, JAL3 = 6'd30;
  localparam state_t JALR0  = 6'd31, JALR1  = 6'd32, JALR2  = 6'd33, JALR3 = 6'd34;
  localparam state_t MM0    = 6'd35, MM1    = 6'd36, MM2    = 6'd37, MM3 = 6'd38,
                     MM4    = 6'd39, MM5    = 6'd40;
  localparam state_t MS0    = 6'd41, MS1    = 6'd42, MS2    = 6'd43, MS3 = 6'd44;
  localparam state_t MD0    = 6'd45, MD1    = 6'd46, MD2    = 6'd47, MD3 = 6'd48;

  typedef struct packed {
    ctrl_t  ctrl;
    state_t next;
  } rom_word_t;

  localparam int ROM_ABITS = 6 + 1 + 1 + 6;

  function automatic rom_word_t w(ctrl_t c, state_t n);
    rom_word_t r;
    r.ctrl = c;
    r.next = n;
    return r;
  endfunction

  // First state of the op-group an opcode belongs to.
  function automatic state_t group_of(opcode_t op);
    unique case (op)
      OPC_ALU:   return ALU0;
      OPC_ADDI, OPC_ADDIU, OPC_SLTI, OPC_SLTIU,
      OPC_ANDI, OPC_ORI, OPC_XORI, OPC_LUI:
                 return ALUI0;
      OPC_LW:    return LW0;
      OPC_SW:    return SW0;
      OPC_BEQZ, OPC_BNEZ:
                 return BZ0;
      OPC_J:     return J0;
      OPC_JR:    return JR0;
      OPC_JAL:   return JAL0;
      OPC_JALR:  return JALR0;
      OPC_ALUMM: return MM0;
      OPC_ALUMS: return MS0;
      OPC_ALUMD: return MD0;
      default:   return FETCH0;
    endcase
  endfunction

  // The table: word at address {opcode, zero?, busy, state}.
  function automatic rom_word_t rom(logic [ROM_ABITS-1:0] a);
    opcode_t op;
    logic    z, bsy;
    state_t  s;
    logic    sext, taken;
    ctrl_t   rd_wait;
    {op, z, bsy, s} = a;
    sext  = op inside {OPC_ADDI, OPC_ADDIU, OPC_SLTI, OPC_SLTIU};
    taken = (op == OPC_BNEZ) ? !z : z;
    rd_wait = xfer(S_MEM, D_NONE);
    unique case (s)
      FETCH0: return w(xfer(S_REG, D_MA, RS_PC), FETCH1);
      FETCH1: return bsy ? w(rd_wait, FETCH1) : w(xfer(S_MEM, D_IR), FETCH2);
      FETCH2: return w(xfer(S_REG, D_A, RS_PC), FETCH3);
      FETCH3: return w(xfer(S_ALU, D_REG, RS_PC, OS_INC4), group_of(op));
      ALU0:   return w(xfer(S_REG, D_A, RS_RS), ALU1);
      ALU1:   return w(xfer(S_REG, D_B, RS_RT), ALU2);
      ALU2:   return w(xfer(S_ALU, D_REG, RS_RD, OS_FUNC), FETCH0);
      ALUI0:  return w(xfer(S_REG, D_A, RS_RS), ALUI1);
      ALUI1:  return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC,
                            sext ? EX_SEXT16 : EX_UEXT16), ALUI2);
      ALUI2:  return w(xfer(S_ALU, D_REG, RS_RT, OS_OPC), FETCH0);
      LW0:    return w(xfer(S_REG, D_A, RS_RS), LW1);
      LW1:    return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16), LW2);
      LW2:    return w(xfer(S_ALU, D_MA, RS_PC, OS_ADD), LW3);
      LW3:    return bsy ? w(rd_wait, LW3) : w(xfer(S_MEM, D_REG, RS_RT), FETCH0);
      SW0:    return w(xfer(S_REG, D_A, RS_RS), SW1);
      SW1:    return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16), SW2);
      SW2:    return w(xfer(S_ALU, D_MA, RS_PC, OS_ADD), SW3);
      SW3:    return w(xfer(S_REG, D_MEM, RS_RT), bsy ? SW3 : FETCH0);
      BZ0:    return w(xfer(S_REG, D_A, RS_RS), BZ1);
      BZ1:    return taken ? w(xfer(S_REG, D_A, RS_PC), BZ2) : w(CTRL_NOP, FETCH0);
      BZ2:    return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_SEXT16_SH2), BZ3);
      BZ3:    return w(xfer(S_ALU, D_REG, RS_PC, OS_ADD), FETCH0);
      J0:     return w(xfer(S_REG, D_A, RS_PC), J1);
      J1:     return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR), J2);
      J2:     return w(xfer(S_ALU, D_REG, RS_PC, OS_JTARG), FETCH0);
      JR0:    return w(xfer(S_REG, D_A, RS_RS), JR1);
      JR1:    return w(xfer(S_ALU, D_REG, RS_PC, OS_PASSA), FETCH0);
      JAL0:   return w(xfer(S_REG, D_A, RS_PC), JAL1);
      JAL1:   return w(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA), JAL2);
      JAL2:   return w(xfer(S_IMM, D_B, RS_PC, OS_FUNC, EX_IR), JAL3);
      JAL3:   return w(xfer(S_ALU, D_REG, RS_PC, OS_JTARG), FETCH0);
      JALR0:  return w(xfer(S_REG, D_A, RS_PC), JALR1);
      JALR1:  return w(xfer(S_REG, D_B, RS_RS), JALR2);
      JALR2:  return w(xfer(S_ALU, D_REG, RS_LINK, OS_PASSA), JALR3);
      JALR3:  return w(xfer(S_ALU, D_REG, RS_PC, OS_PASSB), FETCH0);
      MM0:    return w(xfer(S_REG, D_MA, RS_RS), MM1);
      MM1:    return bsy ? w(rd_wait, MM1) : w(xfer(S_MEM, D_A), MM2);
      MM2:    return w(xfer(S_REG, D_MA, RS_RT), MM3);
      MM3:    return bsy ? w(rd_wait, MM3) : w(xfer(S_MEM, D_B), MM4);
      MM4:    return w(xfer(S_REG, D_MA, RS_RD), MM5);
      MM5:    return w(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC), bsy ? MM5 : FETCH0);
      MS0:    return w(xfer(S_REG, D_MA, RS_RS), MS1);
      MS1:    return bsy ? w(rd_wait, MS1) : w(xfer(S_MEM, D_A), MS2);
      MS2:    return w(xfer(S_REG, D_B, RS_RT), MS3);
      MS3:    return w(xfer(S_ALU, D_REG, RS_RD, OS_FUNC), FETCH0);
      MD0:    return w(xfer(S_REG, D_A, RS_RS), MD1);
      MD1:    return w(xfer(S_REG, D_B, RS_RT), MD2);
      MD2:    return w(xfer(S_REG, D_MA, RS_RD), MD3);
      MD3:    return w(xfer(S_ALU, D_MEM, RS_PC, OS_FUNC), bsy ? MD3 : FETCH0);
      default: return w(CTRL_NOP, FETCH0);
    endcase
  endfunction

  rom_word_t word;

  always_comb word = rom({opcode, zero, busy, state});

  always_ff @(posedge clk) begin
    if (rst) state <= FETCH0;
    else     state <= word.next;
  end

  assign ctrl = word.ctrl;
endmodule
