// ucontroller: the microcoded controller ("MIPS Controller V2").
//
// A microprogram counter (uPC) addresses the control store (ucode_rom).  The
// word read drives the datapath's control signals directly and carries a
// uJumpType.  The jump logic turns uJumpType, zero? and busy into a choice
// among uPC+1, uPC, the absolute address ABSOLUTE and the op-group address
// that op_dispatch derives from the opcode; the uPC loads it at the next
// rising clock edge.  One microinstruction is executed per cycle; the control
// outputs are combinational from the uPC register.  Synchronous reset puts
// the uPC at the first fetch state.
//
// Structure (uPC, ROM, +1, four-way multiplexer, jump logic, "ext") follows
// the lecture's second controller.  The absolute address is a constant: every
// fetch/feqz/fnez target in the microprogram is the first fetch state, so the
// control store does not carry an address field.  That is this design's
// reading of the drawing.
module ucontroller
  import ucode_pkg::*;
#(
  parameter uaddr_t ABSOLUTE = UA_FETCH0
) (
  input  logic    clk,
  input  logic    rst,
  input  opcode_t opcode,
  input  logic    zero,
  input  logic    busy,
  output ctrl_t   ctrl,
  output uaddr_t  upc,
  output ujump_e  jump
);
  uinst_t  uinst;
  uaddr_t  op_group;
  upcsrc_e src;
  uaddr_t  upc_next;

  ucode_rom   u_rom      (.addr(upc), .data(uinst));
  op_dispatch u_dispatch (.opcode(opcode), .op_group(op_group));
  jump_logic  u_jump     (.jump(uinst.jump), .zero(zero), .busy(busy), .src(src));

  always_comb begin
    unique case (src)
      SRC_INC:      upc_next = upc + 1'b1;
      SRC_HOLD:     upc_next = upc;
      SRC_ABSOLUTE: upc_next = ABSOLUTE;
      SRC_OPGROUP:  upc_next = op_group;
      default:      upc_next = ABSOLUTE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) upc <= UA_FETCH0;
    else     upc <= upc_next;
  end

  assign ctrl = uinst.ctrl;
  assign jump = uinst.jump;
endmodule
