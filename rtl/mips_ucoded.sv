// mips_ucoded: a microcoded MIPS machine, controller + bus datapath + memory.
//
// The machine executes a MIPS-like instruction set (register and immediate
// ALU operations, LW/SW, BEQZ/BNEZ, J/JAL/JR/JALR and a memory-to-memory ALU
// instruction) by running, for every instruction, a short microprogram: a
// common fetch sequence, a dispatch on the opcode, and the op-group's own
// sequence of bus transfers.  Instructions take 3 to 7 microcycles after
// fetch, plus the memory's busy cycles for each access.
//
//   ucontroller : uPC, control store, jump logic, opcode dispatch
//                 (CONTROLLER = CTL_UCODE, the default).  Two alternatives:
//                 nano_controller, the same with a two-level store
//                 (CTL_NANO), rom_controller, the unencoded controller
//                 whose single table is addressed by opcode, zero?, busy and
//                 state (CTL_ROM), and wcs_controller, whose control store
//                 is a RAM loaded through the wcs_* port (CTL_WCS).  The
//                 wcs_* inputs are ignored by the other controllers.
//   datapath    : bus, IR/A/B/MA, register file (32 GPRs + PC), ALU, extender
//   mem_module  : slow memory with a busy flag
//
// Interface: clk, synchronous active-high rst.  While rst is high the host
// port may load the program and data (word index, write enable); after it
// falls the machine fetches from RESET_PC.  The PC, IR, uPC (the state with
// CTL_ROM), the current uJumpType (always "next" with CTL_ROM, which has no
// jump types), busy and zero? are brought out for observation.  With
// CTL_WCS the control store must be filled through wcs_we / wcs_addr /
// wcs_wdata (one word per rising edge) while rst is high.
//
// The partitioning and the connections (opcode, zero?, busy to the
// controller; control signals to datapath and memory; bus and MA to the
// memory) follow the lecture's drawings.  Memory depth and latency defaults
// are this design's choices.
module mips_ucoded
  import ucode_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = 1024,
  parameter int unsigned MEM_LATENCY = 10,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter ctl_style_e  CONTROLLER  = CTL_UCODE
) (
  input  logic        clk,
  input  logic        rst,
  // memory load/inspect port
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] ir,
  output uaddr_t      upc,
  output ujump_e      jump,
  output logic        busy,
  output logic        zero,
  // writable control store port (CONTROLLER = CTL_WCS only)
  input  logic        wcs_we,
  input  uaddr_t      wcs_addr,
  input  uinst_t      wcs_wdata
);
  ctrl_t       ctrl;
  opcode_t     opcode;
  logic [31:0] bus, ma, mem_rdata;
  logic        mem_drive;

  if (CONTROLLER == CTL_NANO) begin : g_nano
    nano_controller u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .zero(zero), .busy(busy),
      .ctrl(ctrl), .upc(upc), .jump(jump));
  end else if (CONTROLLER == CTL_ROM) begin : g_rom
    rom_controller u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .zero(zero), .busy(busy),
      .ctrl(ctrl), .state(upc));
    assign jump = J_NEXT;
  end else if (CONTROLLER == CTL_WCS) begin : g_wcs
    wcs_controller u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .zero(zero), .busy(busy),
      .ctrl(ctrl), .upc(upc), .jump(jump),
      .wcs_we(wcs_we), .wcs_addr(wcs_addr), .wcs_wdata(wcs_wdata));
  end else begin : g_ucode
    ucontroller u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .zero(zero), .busy(busy),
      .ctrl(ctrl), .upc(upc), .jump(jump));
  end

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl), .mem_rdata(mem_rdata),
    .mem_drive(mem_drive), .bus(bus), .ma(ma), .opcode(opcode), .zero(zero),
    .pc(pc), .ir(ir));

  mem_module #(.DEPTH(MEM_DEPTH), .LATENCY(MEM_LATENCY)) u_mem (
    .clk(clk), .rst(rst), .addr(ma), .enable(ctrl.enMem), .write(ctrl.MemWrt),
    .wdata(bus), .rdata(mem_rdata), .drive(mem_drive), .busy(busy),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .host_rdata(host_rdata));
endmodule
