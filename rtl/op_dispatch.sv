// op_dispatch: the "ext" box of the controller, opcode to op-group address.
//
// Maps the 6-bit opcode of the instruction register to the microaddress of
// the first state of its op-group.  The controller takes this address when a
// microinstruction's next-state code is "dispatch".  Grouping opcodes that
// share a microcode sequence is what keeps the control store short: all
// register-register ALU instructions share one group, the immediate ALU
// instructions two (sign- or zero-extended immediate).  An opcode without a
// group is executed as a no-operation (back to fetch).  Combinational.
//
// The op-groups follow the lecture's microprogram; the opcode values and the
// no-operation treatment of unknown opcodes are this design's choices.
module op_dispatch
  import ucode_pkg::*;
(
  input  opcode_t opcode,
  output uaddr_t  op_group
);
  always_comb begin
    unique case (opcode)
      OPC_ALU:                                  op_group = UA_ALU;
      OPC_ADDI, OPC_ADDIU, OPC_SLTI, OPC_SLTIU: op_group = UA_ALUI;
      OPC_ANDI, OPC_ORI, OPC_XORI, OPC_LUI:     op_group = UA_ALUIU;
      OPC_LW:                                   op_group = UA_LW;
      OPC_SW:                                   op_group = UA_SW;
      OPC_BEQZ:                                 op_group = UA_BEQZ;
      OPC_BNEZ:                                 op_group = UA_BNEZ;
      OPC_J:                                    op_group = UA_J;
      OPC_JR:                                   op_group = UA_JR;
      OPC_JAL:                                  op_group = UA_JAL;
      OPC_JALR:                                 op_group = UA_JALR;
      OPC_ALUMM:                                op_group = UA_ALUMM;
      OPC_ALUMS:                                op_group = UA_ALUMS;
      OPC_ALUMD:                                op_group = UA_ALUMD;
      default:                                  op_group = UA_FETCH0;
    endcase
  end
endmodule
