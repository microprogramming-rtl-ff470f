// wcs_controller: the microcoded controller with a writable control store.
//
// The same sequencer as ucontroller: uPC, +1, jump logic, op_dispatch and
// the four-way next-address multiplexer.  Only the store differs: a 64-word
// RAM of microinstructions (18 control bits + 3-bit uJumpType) instead of
// ucode_rom.  The microprogram can therefore be loaded at start-up and
// patched later without changing the hardware.
//
// Interface and timing:
//   - clk, rst, opcode, zero, busy, ctrl, upc, jump: as in ucontroller.
//     The store is read combinationally at the uPC, so one microinstruction
//     still executes per cycle.
//   - wcs_we, wcs_addr, wcs_wdata: write port.  The word is written at the
//     rising clock edge while wcs_we is high.  A write to the word being
//     executed takes effect from the next cycle on.
//   - The RAM has no reset.  A loader, normally working while rst holds the
//     machine at fetch0, must fill every word before rst is released.
//
// Follows the lecture: the control store is held in a RAM rather than a
// ROM, so microcode can be changed and patches loaded at start-up.  Own
// choices: the write port, its timing, and that the word format and
// sequencing are those of ucontroller.
module wcs_controller
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
  output ujump_e  jump,
  // control store write port
  input  logic    wcs_we,
  input  uaddr_t  wcs_addr,
  input  uinst_t  wcs_wdata
);
  uinst_t  store [2**UAW];
  uinst_t  uinst;
  uaddr_t  op_group;
  upcsrc_e src;
  uaddr_t  upc_next;

  always_ff @(posedge clk) begin
    if (wcs_we) store[wcs_addr] <= wcs_wdata;
  end

  assign uinst = store[upc];

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
