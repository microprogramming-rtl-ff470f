// jump_logic: picks the source of the next microprogram counter (uPCSrc).
//
// From the current microinstruction's uJumpType and the two status inputs
// (zero?, busy) it selects uPC+1, uPC (stay), the absolute address or the
// op-group address:
//   next     -> uPC+1
//   spin     -> busy ? uPC : uPC+1
//   fetch    -> absolute
//   dispatch -> op-group
//   feqz     -> zero ? absolute : uPC+1
//   fnez     -> zero ? uPC+1 : absolute
// Combinational.  The table is the lecture's; the encodings are in ucode_pkg.
module jump_logic
  import ucode_pkg::*;
(
  input  ujump_e  jump,
  input  logic    zero,
  input  logic    busy,
  output upcsrc_e src
);
  always_comb begin
    unique case (jump)
      J_NEXT:     src = SRC_INC;
      J_SPIN:     src = busy ? SRC_HOLD : SRC_INC;
      J_FETCH:    src = SRC_ABSOLUTE;
      J_DISPATCH: src = SRC_OPGROUP;
      J_FEQZ:     src = zero ? SRC_ABSOLUTE : SRC_INC;
      J_FNEZ:     src = zero ? SRC_INC : SRC_ABSOLUTE;
      default:    src = SRC_ABSOLUTE;
    endcase
  end
endmodule
