// nano_controller: a nanocoded version of the microcoded controller.
//
// Behaves exactly like ucontroller (same ports, same microprogram, same
// timing: one microinstruction per cycle, control outputs combinational from
// the uPC) but stores the microprogram in two levels.  The uPC addresses a
// narrow microcode ROM (nano_urom) whose word holds the uJumpType and a
// nanoaddress; the nanoaddress selects the full control word in a small
// nanoinstruction ROM (nano_rom) that holds every distinct transfer once.
// Next-uPC selection (uPC+1, uPC, absolute, op-group) and the jump logic are
// the same as in the one-level controller.
//
// The two-level store (uPC -> microcode ROM -> nanoaddress ->
// nanoinstruction ROM -> control signals, next state from the microcode ROM)
// follows the lecture's nanocoding scheme; applying it to this microprogram
// is this design's choice.  The control path is one ROM deeper, which a real
// implementation pays for in cycle time.
module nano_controller
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
  nanoaddr_t nano;
  uaddr_t    op_group;
  upcsrc_e   src;
  uaddr_t    upc_next;

  nano_urom   u_urom     (.addr(upc), .nano(nano), .jump(jump));
  nano_rom    u_nrom     (.addr(nano), .ctrl(ctrl));
  op_dispatch u_dispatch (.opcode(opcode), .op_group(op_group));
  jump_logic  u_jump     (.jump(jump), .zero(zero), .busy(busy), .src(src));

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
endmodule
