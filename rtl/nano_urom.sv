// nano_urom: the microcode ROM of the nanocoded controller variant.
//
// Same microprogram, same addresses and same uJumpTypes as ucode_rom, but
// each 8-bit word holds only a 5-bit nanoaddress (which control word to
// apply, looked up in nano_rom) and the 3-bit uJumpType, instead of the
// 18 control bits.  64 x 8 bits plus 32 x 18 bits of nanostore replace
// 64 x 21 bits.  Reading is combinational.
//
// Splitting the control store this way follows the lecture's nanocoding
// scheme; the word widths follow from this design's microprogram.
module nano_urom
  import ucode_pkg::*;
(
  input  uaddr_t     addr,
  output nanoaddr_t  nano,
  output ujump_e     jump
);
  always_comb begin
    unique case (addr)
      6'd0:  begin nano = NA_MA_PC;    jump = J_NEXT;     end
      6'd1:  begin nano = NA_IR_MEM;   jump = J_SPIN;     end
      6'd2:  begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd3:  begin nano = NA_PC_INC4;  jump = J_DISPATCH; end
      6'd4:  begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd5:  begin nano = NA_B_RT;     jump = J_NEXT;     end
      6'd6:  begin nano = NA_RD_FUNC;  jump = J_FETCH;    end
      6'd7:  begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd8:  begin nano = NA_B_SEXT;   jump = J_NEXT;     end
      6'd9:  begin nano = NA_RT_OP;    jump = J_FETCH;    end
      6'd10: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd11: begin nano = NA_B_UEXT;   jump = J_NEXT;     end
      6'd12: begin nano = NA_RT_OP;    jump = J_FETCH;    end
      6'd13: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd14: begin nano = NA_B_SEXT;   jump = J_NEXT;     end
      6'd15: begin nano = NA_MA_AB;    jump = J_NEXT;     end
      6'd16: begin nano = NA_RT_MEM;   jump = J_SPIN;     end
      6'd17: begin nano = NA_NOP;      jump = J_FETCH;    end
      6'd18: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd19: begin nano = NA_B_SEXT;   jump = J_NEXT;     end
      6'd20: begin nano = NA_MA_AB;    jump = J_NEXT;     end
      6'd21: begin nano = NA_MEM_RT;   jump = J_SPIN;     end
      6'd22: begin nano = NA_NOP;      jump = J_FETCH;    end
      6'd23: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd24: begin nano = NA_NOP;      jump = J_FNEZ;     end
      6'd25: begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd26: begin nano = NA_B_BOFF;   jump = J_NEXT;     end
      6'd27: begin nano = NA_PC_AB;    jump = J_FETCH;    end
      6'd28: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd29: begin nano = NA_NOP;      jump = J_FEQZ;     end
      6'd30: begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd31: begin nano = NA_B_BOFF;   jump = J_NEXT;     end
      6'd32: begin nano = NA_PC_AB;    jump = J_FETCH;    end
      6'd33: begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd34: begin nano = NA_B_IR;     jump = J_NEXT;     end
      6'd35: begin nano = NA_PC_JTARG; jump = J_FETCH;    end
      6'd36: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd37: begin nano = NA_PC_A;     jump = J_FETCH;    end
      6'd38: begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd39: begin nano = NA_LINK_A;   jump = J_NEXT;     end
      6'd40: begin nano = NA_B_IR;     jump = J_NEXT;     end
      6'd41: begin nano = NA_PC_JTARG; jump = J_FETCH;    end
      6'd42: begin nano = NA_A_PC;     jump = J_NEXT;     end
      6'd43: begin nano = NA_B_RS;     jump = J_NEXT;     end
      6'd44: begin nano = NA_LINK_A;   jump = J_NEXT;     end
      6'd45: begin nano = NA_PC_B;     jump = J_FETCH;    end
      6'd46: begin nano = NA_MA_RS;    jump = J_NEXT;     end
      6'd47: begin nano = NA_A_MEM;    jump = J_SPIN;     end
      6'd48: begin nano = NA_MA_RT;    jump = J_NEXT;     end
      6'd49: begin nano = NA_B_MEM;    jump = J_SPIN;     end
      6'd50: begin nano = NA_MA_RD;    jump = J_NEXT;     end
      6'd51: begin nano = NA_MEM_FUNC; jump = J_SPIN;     end
      6'd53: begin nano = NA_MA_RS;    jump = J_NEXT;     end
      6'd54: begin nano = NA_A_MEM;    jump = J_SPIN;     end
      6'd55: begin nano = NA_B_RT;     jump = J_NEXT;     end
      6'd56: begin nano = NA_RD_FUNC;  jump = J_FETCH;    end
      6'd57: begin nano = NA_A_RS;     jump = J_NEXT;     end
      6'd58: begin nano = NA_B_RT;     jump = J_NEXT;     end
      6'd59: begin nano = NA_MA_RD;    jump = J_NEXT;     end
      6'd60: begin nano = NA_MEM_FUNC; jump = J_SPIN;     end
      default: begin nano = NA_NOP;    jump = J_FETCH;    end
    endcase
  end
endmodule
