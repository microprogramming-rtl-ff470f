// datapath: the bus-based MIPS datapath.
//
// All data moves over one 32-bit bus, one transfer per cycle.  Four units can
// drive it: the immediate extender (enImm), the ALU (enALU), the register
// file (enReg with RegWrt clear) and the memory (outside this module; its
// drive flag and read data come in on mem_drive / mem_rdata).  Four registers
// load from it at the rising clock edge: IR (ldIR), A (ldA), B (ldB) and the
// memory address register MA (ldMA); the register file writes it when enReg
// and RegWrt are both set.  The register file address comes from the RegSel
// multiplexer: PC (32), Link (31), or the rd / rt / rs field of IR.  A and B
// feed the ALU, whose operation alu_control derives from OpSel and IR.
// Outputs to the controller are the opcode (IR[31:26]) and zero? (A == 0);
// to the memory the bus value and MA.
//
// The drawing has tri-state drivers onto the bus; here the bus is a
// multiplexer of the enabled sources, and an assertion checks that at most
// one source drives it in any cycle (a bus with no driver reads 0).  Reset
// clears IR, A, B and MA.  Units, names and connections follow the datapath
// drawing; the multiplexed bus and the reset values are this design's choice.
module datapath
  import ucode_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  // memory side
  input  logic [31:0] mem_rdata,
  input  logic        mem_drive,
  output logic [31:0] bus,
  output logic [31:0] ma,
  // controller side
  output opcode_t     opcode,
  output logic        zero,
  // observation
  output logic [31:0] pc,
  output logic [31:0] ir
);
  logic [31:0] a_q, b_q;
  logic [31:0] imm, alu_y, reg_rdata;
  logic [5:0]  reg_addr;
  logic        reg_we, reg_drive;
  aluop_e      alu_op;

  // ---- register-file address (RegSel) and port control
  always_comb begin
    unique case (ctrl.RegSel)
      RS_PC:   reg_addr = 6'd32;
      RS_LINK: reg_addr = 6'd31;
      RS_RD:   reg_addr = {1'b0, f_rd(ir)};
      RS_RT:   reg_addr = {1'b0, f_rt(ir)};
      RS_RS:   reg_addr = {1'b0, f_rs(ir)};
      default: reg_addr = 6'd32;
    endcase
  end
  assign reg_we    = ctrl.enReg &&  ctrl.RegWrt;
  assign reg_drive = ctrl.enReg && !ctrl.RegWrt;

  imm_ext     u_ext  (.ir(ir), .ext_sel(ctrl.ExtSel), .imm(imm));
  alu_control u_aluc (.op_sel(ctrl.OpSel), .ir(ir), .alu_op(alu_op));
  alu         u_alu  (.alu_op(alu_op), .a(a_q), .b(b_q), .y(alu_y), .zero(zero));
  reg_file #(.NREGS(33), .RESET_PC(RESET_PC)) u_rf (
    .clk(clk), .rst(rst), .addr(reg_addr), .we(reg_we), .wdata(bus),
    .rdata(reg_rdata), .pc(pc));

  // ---- the bus
  always_comb begin
    bus = 32'd0;
    if (ctrl.enImm) bus = bus | imm;
    if (ctrl.enALU) bus = bus | alu_y;
    if (reg_drive)  bus = bus | reg_rdata;
    if (mem_drive)  bus = bus | mem_rdata;
  end

  // ---- bus-loaded registers
  always_ff @(posedge clk) begin
    if (rst) begin
      ir  <= 32'd0;
      a_q <= 32'd0;
      b_q <= 32'd0;
      ma  <= 32'd0;
    end else begin
      if (ctrl.ldIR) ir  <= bus;
      if (ctrl.ldA)  a_q <= bus;
      if (ctrl.ldB)  b_q <= bus;
      if (ctrl.ldMA) ma  <= bus;
    end
  end

  assign opcode = f_opcode(ir);

  // At most one unit may drive the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.enImm, ctrl.enALU, reg_drive, mem_drive}));
endmodule
