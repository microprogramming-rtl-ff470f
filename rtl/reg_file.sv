// reg_file: the register file of the bus datapath, 32 GPRs plus the PC.
//
// One port serves the bus: the 6-bit address comes from the RegSel
// multiplexer (registers 0..31, and 32 for the PC).  Reading is
// combinational (the datapath puts rdata on the bus when enReg is set and
// RegWrt is clear); a write (enReg and RegWrt) takes wdata from the bus at the
// rising clock edge.  Register 0 always reads as zero, as in MIPS.  A
// synchronous reset clears every register and sets the PC to RESET_PC.  The
// PC is also brought out for observation.
//
// The GPRs, the PC living in the same file as register 32 and the single bus
// port follow the datapath drawing; r0 = 0, the reset values and the read
// timing are this design's choices.
module reg_file #(
  parameter int unsigned  NREGS    = 33,          // 32 GPRs + PC
  parameter logic [31:0]  RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic [31:0] pc
);
  localparam int unsigned PC_IDX = NREGS - 1;

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= 32'd0;
      regs[PC_IDX] <= RESET_PC;
    end else if (we && addr != 6'd0 && 32'(addr) < NREGS) begin
      regs[addr] <= wdata;
    end
  end

  always_comb begin
    if (addr == 6'd0 || 32'(addr) >= NREGS) rdata = 32'd0;
    else                                    rdata = regs[addr];
  end

  assign pc = regs[PC_IDX];
endmodule
