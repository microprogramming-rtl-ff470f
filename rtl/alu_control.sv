// alu_control: chooses the ALU operation ("ALU control" box of the datapath).
//
// OpSel from the microinstruction says where the operation comes from: the
// IR func field (func(A,B) of register-register and memory-memory ALU
// instructions), the IR opcode (Op(A,B) of immediate ALU instructions), or a
// fixed operation the microprogram needs (A+B, A+4, jump target, pass A,
// pass B).  Purely combinational.
//
// The sources func/opcode follow the microprogram; the codes decoded and the
// fixed operations being selected here (with a 3-bit OpSel) are this
// design's choices.  Unknown codes give ADD.
module alu_control
  import ucode_pkg::*;
(
  input  opsel_e      op_sel,
  input  logic [31:0] ir,
  output aluop_e      alu_op
);
  function automatic aluop_e decode_func(input func_t fn);
    unique case (fn)
      FN_ADD, FN_ADDU: return ALU_ADD;
      FN_SUB, FN_SUBU: return ALU_SUB;
      FN_AND:          return ALU_AND;
      FN_OR:           return ALU_OR;
      FN_XOR:          return ALU_XOR;
      FN_NOR:          return ALU_NOR;
      FN_SLT:          return ALU_SLT;
      FN_SLTU:         return ALU_SLTU;
      FN_SLLV:         return ALU_SLL;
      FN_SRLV:         return ALU_SRL;
      FN_SRAV:         return ALU_SRA;
      default:         return ALU_ADD;
    endcase
  endfunction

  function automatic aluop_e decode_opcode(input opcode_t opc);
    unique case (opc)
      OPC_ADDI, OPC_ADDIU: return ALU_ADD;
      OPC_SLTI:            return ALU_SLT;
      OPC_SLTIU:           return ALU_SLTU;
      OPC_ANDI:            return ALU_AND;
      OPC_ORI:             return ALU_OR;
      OPC_XORI:            return ALU_XOR;
      OPC_LUI:             return ALU_LUI;
      default:             return ALU_ADD;
    endcase
  endfunction

  always_comb begin
    unique case (op_sel)
      OS_FUNC:  alu_op = decode_func(f_func(ir));
      OS_OPC:   alu_op = decode_opcode(f_opcode(ir));
      OS_ADD:   alu_op = ALU_ADD;
      OS_INC4:  alu_op = ALU_INC4;
      OS_JTARG: alu_op = ALU_JTARG;
      OS_PASSA: alu_op = ALU_PASSA;
      OS_PASSB: alu_op = ALU_PASSB;
      default:  alu_op = ALU_ADD;
    endcase
  end
endmodule
