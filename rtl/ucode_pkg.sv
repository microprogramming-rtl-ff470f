// ucode_pkg: shared types and constants of the microcoded MIPS machine.
//
// The machine is a single 32-bit bus datapath (IR, A, B, MA, a register file
// holding 32 GPRs plus the PC, an immediate extender, an ALU and a slow
// memory) steered by a microcoded controller.  Every microinstruction is one
// register-to-register transfer over the bus plus a next-state code
// (uJumpType).  This package holds the instruction fields and opcodes, the
// control word that the controller drives into the datapath, and the
// encodings of its multi-bit fields.
//
// Follows the lecture material: the names and meaning of the control signals
// (ldIR, OpSel, ldA, ldB, RegSel, RegWrt, enReg, ldMA, MemWrt, enMem, ExtSel,
// enImm, enALU), the 3-bit RegSel choosing PC / Link / rd / rt / rs, the 2-bit
// ExtSel, the six uJumpTypes, the instruction formats.  Own choices: the
// numeric opcodes and function codes (taken from MIPS/DLX usage), the encoding
// values, the opcodes of the three memory ALU instructions, and OpSel being
// 3 bits wide instead of 2 (the fixed ALU operations that the microcode needs,
// A+4, A+B, jump target, pass A, pass B, do not fit in 2 bits next to the
// two instruction-selected ones), which makes the control word 18 bits.
package ucode_pkg;

  localparam int unsigned UAW  = 6;    // microaddress width ("s = 6")

  // Controller organisations the machine can be built with.
  typedef enum logic [1:0] {
    CTL_UCODE = 2'd0,  // encoded microcode: uPC, control store, jump logic
    CTL_NANO  = 2'd1,  // the same microprogram in a two-level store
    CTL_ROM   = 2'd2,  // unencoded: one table on {opcode, zero?, busy, state}
    CTL_WCS   = 2'd3   // encoded microcode in a writable control store (RAM)
  } ctl_style_e;

  // ---------------------------------------------------------------- opcodes
  typedef logic [5:0] opcode_t;
  localparam opcode_t OPC_ALU   = 6'h00;  // R-type, operation in func field
  localparam opcode_t OPC_J     = 6'h02;
  localparam opcode_t OPC_JAL   = 6'h03;
  localparam opcode_t OPC_BEQZ  = 6'h04;
  localparam opcode_t OPC_BNEZ  = 6'h05;
  localparam opcode_t OPC_ADDI  = 6'h08;
  localparam opcode_t OPC_ADDIU = 6'h09;
  localparam opcode_t OPC_SLTI  = 6'h0A;
  localparam opcode_t OPC_SLTIU = 6'h0B;
  localparam opcode_t OPC_ANDI  = 6'h0C;
  localparam opcode_t OPC_ORI   = 6'h0D;
  localparam opcode_t OPC_XORI  = 6'h0E;
  localparam opcode_t OPC_LUI   = 6'h0F;
  localparam opcode_t OPC_JR    = 6'h12;
  localparam opcode_t OPC_JALR  = 6'h13;
  localparam opcode_t OPC_LW    = 6'h23;
  localparam opcode_t OPC_SW    = 6'h2B;
  localparam opcode_t OPC_ALUMM = 6'h3C;  // M[(rd)] <- M[(rs)] func M[(rt)]
  localparam opcode_t OPC_ALUMS = 6'h3D;  // rd <- M[(rs)] func (rt)
  localparam opcode_t OPC_ALUMD = 6'h3E;  // M[(rd)] <- (rs) func (rt)

  // R-type function codes (also used by ALUMM, ALUMS and ALUMD)
  typedef logic [5:0] func_t;
  localparam func_t FN_SLLV = 6'h04;
  localparam func_t FN_SRLV = 6'h06;
  localparam func_t FN_SRAV = 6'h07;
  localparam func_t FN_ADD  = 6'h20;
  localparam func_t FN_ADDU = 6'h21;
  localparam func_t FN_SUB  = 6'h22;
  localparam func_t FN_SUBU = 6'h23;
  localparam func_t FN_AND  = 6'h24;
  localparam func_t FN_OR   = 6'h25;
  localparam func_t FN_XOR  = 6'h26;
  localparam func_t FN_NOR  = 6'h27;
  localparam func_t FN_SLT  = 6'h2A;
  localparam func_t FN_SLTU = 6'h2B;

  // Instruction fields (formats: opcode 6 | rs 5 | rt 5 | rd 5 | 0 5 | func 6,
  // opcode | rs | rt | imm 16, opcode | offset 26).
  function automatic opcode_t f_opcode(input logic [31:0] ir); return ir[31:26]; endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] ir);  return ir[25:21]; endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] ir);  return ir[20:16]; endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] ir);  return ir[15:11]; endfunction
  function automatic func_t f_func(input logic [31:0] ir);     return ir[5:0];   endfunction

  // ------------------------------------------------------ control encodings
  // RegSel: which register the register file addresses (3 bits).
  typedef enum logic [2:0] {
    RS_PC   = 3'd0,   // register 32, the PC
    RS_LINK = 3'd1,   // register 31
    RS_RD   = 3'd2,
    RS_RT   = 3'd3,
    RS_RS   = 3'd4
  } regsel_e;

  // ExtSel: what the immediate extender puts on the bus when enImm (2 bits).
  typedef enum logic [1:0] {
    EX_SEXT16     = 2'd0,  // sExt16(Imm)
    EX_UEXT16     = 2'd1,  // uExt16(Imm)
    EX_SEXT16_SH2 = 2'd2,  // sExt16(Imm << 2), branch offset
    EX_IR         = 2'd3   // the whole IR, for B <- IR
  } extsel_e;

  // OpSel: where the ALU control takes the operation from.
  typedef enum logic [2:0] {
    OS_FUNC  = 3'd0,   // func(A,B): IR func field
    OS_OPC   = 3'd1,   // Op(A,B): IR opcode (immediate ALU instructions)
    OS_ADD   = 3'd2,   // A + B
    OS_INC4  = 3'd3,   // A + 4
    OS_JTARG = 3'd4,   // JumpTarg(A,B) = {A[31:28], B[25:0], 00}
    OS_PASSA = 3'd5,   // A
    OS_PASSB = 3'd6    // B
  } opsel_e;

  // Operations the ALU itself performs.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_INC4, ALU_JTARG, ALU_PASSA, ALU_PASSB
  } aluop_e;

  // The datapath control word: one bus transfer per cycle.
  typedef struct packed {
    logic    ldIR;
    opsel_e  OpSel;
    logic    ldA;
    logic    ldB;
    regsel_e RegSel;
    logic    RegWrt;
    logic    enReg;
    logic    ldMA;
    logic    MemWrt;
    logic    enMem;
    extsel_e ExtSel;
    logic    enImm;
    logic    enALU;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    ldIR: 1'b0, OpSel: OS_FUNC, ldA: 1'b0, ldB: 1'b0, RegSel: RS_PC,
    RegWrt: 1'b0, enReg: 1'b0, ldMA: 1'b0, MemWrt: 1'b0, enMem: 1'b0,
    ExtSel: EX_SEXT16, enImm: 1'b0, enALU: 1'b0};

  // Next-state codes of a microinstruction.
  typedef enum logic [2:0] {
    J_NEXT     = 3'd0,  // uPC + 1
    J_SPIN     = 3'd1,  // busy ? uPC : uPC + 1
    J_FETCH    = 3'd2,  // absolute (the fetch sequence)
    J_DISPATCH = 3'd3,  // op-group of the opcode
    J_FEQZ     = 3'd4,  // zero ? absolute : uPC + 1
    J_FNEZ     = 3'd5   // zero ? uPC + 1 : absolute
  } ujump_e;

  // Source of the next uPC, chosen by the jump logic.
  typedef enum logic [1:0] {
    SRC_INC      = 2'd0,  // uPC + 1
    SRC_HOLD     = 2'd1,  // uPC
    SRC_ABSOLUTE = 2'd2,
    SRC_OPGROUP  = 2'd3
  } upcsrc_e;

  typedef struct packed {
    ctrl_t  ctrl;
    ujump_e jump;
  } uinst_t;

  typedef logic [UAW-1:0] uaddr_t;

  // Microprogram layout (entry points of the op-groups).
  localparam uaddr_t UA_FETCH0 = 6'd0;
  localparam uaddr_t UA_ALU    = 6'd4;
  localparam uaddr_t UA_ALUI   = 6'd7;   // sign-extended immediate
  localparam uaddr_t UA_ALUIU  = 6'd10;  // zero-extended immediate
  localparam uaddr_t UA_LW     = 6'd13;
  localparam uaddr_t UA_SW     = 6'd18;
  localparam uaddr_t UA_BEQZ   = 6'd23;
  localparam uaddr_t UA_BNEZ   = 6'd28;
  localparam uaddr_t UA_J      = 6'd33;
  localparam uaddr_t UA_JR     = 6'd36;
  localparam uaddr_t UA_JAL    = 6'd38;
  localparam uaddr_t UA_JALR   = 6'd42;
  localparam uaddr_t UA_ALUMM  = 6'd46;
  localparam uaddr_t UA_ALUMS  = 6'd53;  // memory source operand
  localparam uaddr_t UA_ALUMD  = 6'd57;  // memory destination

  // ------------------------------------------- building control words
  // A microinstruction's transfer is "destination <- source": the source
  // drives the bus, the destination loads it.
  typedef enum logic [2:0] {S_NONE, S_REG, S_ALU, S_IMM, S_MEM} src_e;
  typedef enum logic [2:0] {D_NONE, D_A, D_B, D_MA, D_IR, D_REG, D_MEM} dst_e;

  function automatic ctrl_t xfer(src_e src, dst_e dst, regsel_e rsel = RS_PC,
                                 opsel_e op = OS_FUNC, extsel_e ext = EX_SEXT16);
    ctrl_t c = CTRL_NOP;
    unique case (src)
      S_REG: begin c.enReg = 1'b1; c.RegSel = rsel; end
      S_ALU: begin c.enALU = 1'b1; c.OpSel  = op;   end
      S_IMM: begin c.enImm = 1'b1; c.ExtSel = ext;  end
      S_MEM: c.enMem = 1'b1;
      default: ;
    endcase
    unique case (dst)
      D_A:   c.ldA  = 1'b1;
      D_B:   c.ldB  = 1'b1;
      D_MA:  c.ldMA = 1'b1;
      D_IR:  c.ldIR = 1'b1;
      D_REG: begin c.enReg = 1'b1; c.RegWrt = 1'b1; c.RegSel = rsel; end
      D_MEM: begin c.enMem = 1'b1; c.MemWrt = 1'b1; end
      default: ;
    endcase
    return c;
  endfunction

  // ------------------------------------------------ nanocoded variant
  // Nanoaddresses: one per distinct transfer of the microprogram.
  typedef logic [4:0] nanoaddr_t;
  localparam nanoaddr_t NA_NOP      = 5'd0;
  localparam nanoaddr_t NA_MA_PC    = 5'd1;   // MA <- PC
  localparam nanoaddr_t NA_IR_MEM   = 5'd2;   // IR <- Memory
  localparam nanoaddr_t NA_A_PC     = 5'd3;   // A <- PC
  localparam nanoaddr_t NA_PC_INC4  = 5'd4;   // PC <- A + 4
  localparam nanoaddr_t NA_A_RS     = 5'd5;   // A <- Reg[rs]
  localparam nanoaddr_t NA_B_RT     = 5'd6;   // B <- Reg[rt]
  localparam nanoaddr_t NA_RD_FUNC  = 5'd7;   // Reg[rd] <- func(A,B)
  localparam nanoaddr_t NA_B_SEXT   = 5'd8;   // B <- sExt16(Imm)
  localparam nanoaddr_t NA_RT_OP    = 5'd9;   // Reg[rt] <- Op(A,B)
  localparam nanoaddr_t NA_B_UEXT   = 5'd10;  // B <- uExt16(Imm)
  localparam nanoaddr_t NA_MA_AB    = 5'd11;  // MA <- A + B
  localparam nanoaddr_t NA_RT_MEM   = 5'd12;  // Reg[rt] <- Memory
  localparam nanoaddr_t NA_MEM_RT   = 5'd13;  // Memory <- Reg[rt]
  localparam nanoaddr_t NA_B_BOFF   = 5'd14;  // B <- sExt16(Imm << 2)
  localparam nanoaddr_t NA_PC_AB    = 5'd15;  // PC <- A + B
  localparam nanoaddr_t NA_B_IR     = 5'd16;  // B <- IR
  localparam nanoaddr_t NA_PC_JTARG = 5'd17;  // PC <- JumpTarg(A,B)
  localparam nanoaddr_t NA_PC_A     = 5'd18;  // PC <- A
  localparam nanoaddr_t NA_LINK_A   = 5'd19;  // Reg[31] <- A
  localparam nanoaddr_t NA_B_RS     = 5'd20;  // B <- Reg[rs]
  localparam nanoaddr_t NA_PC_B     = 5'd21;  // PC <- B
  localparam nanoaddr_t NA_MA_RS    = 5'd22;  // MA <- Reg[rs]
  localparam nanoaddr_t NA_A_MEM    = 5'd23;  // A <- Memory
  localparam nanoaddr_t NA_MA_RT    = 5'd24;  // MA <- Reg[rt]
  localparam nanoaddr_t NA_B_MEM    = 5'd25;  // B <- Memory
  localparam nanoaddr_t NA_MA_RD    = 5'd26;  // MA <- Reg[rd]
  localparam nanoaddr_t NA_MEM_FUNC = 5'd27;  // Memory <- func(A,B)

endpackage
