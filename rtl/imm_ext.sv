// imm_ext: the immediate extender ("Imm Ext") of the bus datapath.
//
// Takes the instruction register and produces the 32-bit value that goes on
// the bus when enImm is set.  The 2-bit ExtSel chooses sign extension of the
// 16-bit immediate, zero extension of it, sign extension of the immediate
// shifted left by two (the branch offset), or the whole IR (used for
// B <- IR ahead of a jump-target computation).  Purely combinational.
//
// The three extensions are the ones the microprogram uses; routing the IR
// through this unit for B <- IR is this design's choice, since the datapath
// has no other path from IR to the bus.
module imm_ext
  import ucode_pkg::*;
(
  input  logic [31:0] ir,
  input  extsel_e     ext_sel,
  output logic [31:0] imm
);
  logic [15:0] imm16;
  assign imm16 = ir[15:0];

  always_comb begin
    unique case (ext_sel)
      EX_SEXT16:     imm = {{16{imm16[15]}}, imm16};
      EX_UEXT16:     imm = {16'h0000, imm16};
      EX_SEXT16_SH2: imm = {{14{imm16[15]}}, imm16, 2'b00};
      EX_IR:         imm = ir;
      default:       imm = ir;
    endcase
  end
endmodule
