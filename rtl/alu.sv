// alu: the 32-bit ALU of the bus datapath.
//
// Combines the A and B registers under the operation chosen by alu_control
// and drives the result towards the bus (the datapath gates it with enALU).
// It also produces zero?, the test the branch microcode makes on A
// ("If zero?(A) then ..."), for the controller's jump logic.
// Purely combinational.
//
// The operation list covers what the microprogram asks of the ALU: func(A,B)
// and Op(A,B) for the instruction set, A+B for addresses, A+4 for the PC,
// JumpTarg(A,B) = {A[31:28], B[25:0], 00}, and passing A or B through.  The
// set of instruction operations (add, sub, logic, set-less-than, variable
// shifts, load-upper) is this design's choice.  Shifts use B[4:0] as amount
// of shifting A.
module alu
  import ucode_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero    // A == 0
);
  always_comb begin
    unique case (alu_op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'd0, a < b};
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_LUI:   y = {b[15:0], 16'h0000};
      ALU_INC4:  y = a + 32'd4;
      ALU_JTARG: y = {a[31:28], b[25:0], 2'b00};
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end

  assign zero = (a == 32'd0);
endmodule
