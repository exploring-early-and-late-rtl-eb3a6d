// alu: 32-bit integer ALU with branch-condition evaluation.
//
// The dual-ALU pipeline holds two identical copies of this unit: the early ALU
// in the EXE stage and the late ALU in the DC-2 stage. Either copy executes
// arithmetic, logic, compare and shift operations and also resolves branches,
// so a branch steered to the late ALU is resolved there. Purely combinational:
// results are valid in the same cycle as the operands. The operation set is
// that of the MIPS I integer instructions this pipeline decodes (a design
// choice: the source names a "MIPS-like" pipeline without listing its ISA).
//
//   op, a, b -> y        : ALU result (b carries the immediate when selected)
//   br, a, b -> taken    : condition of a conditional branch, 1 for jumps
module alu
  import dcpu_pkg::*;
(
  input  alu_op_e     op,
  input  br_e         br,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        taken
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = $unsigned($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end

  always_comb begin
    unique case (br)
      BR_EQ:   taken = (a == b);
      BR_NE:   taken = (a != b);
      BR_LEZ:  taken = $signed(a) <= 0;
      BR_GTZ:  taken = $signed(a) > 0;
      BR_LTZ:  taken = a[31];
      BR_GEZ:  taken = !a[31];
      BR_J,
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end

endmodule
