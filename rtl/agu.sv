// agu: address generation unit of the EXE stage.
//
// Forms the effective byte address of a load or store as base register plus
// sign-extended 16-bit displacement (MIPS base+offset addressing), and flags a
// word access whose address is not word aligned. Combinational. The AGU sits in
// EXE in every configuration the source evaluates; because its base operand is
// needed there, a base produced by the late ALU, a load or the multiplier in
// one of the two preceding instructions forces an issue stall (see alu_steer).
module agu (
  input  logic [31:0] base,
  input  logic [31:0] offset,   // already sign-extended
  output logic [31:0] addr,
  output logic        misaligned
);
  always_comb begin
    addr       = base + offset;
    misaligned = |addr[1:0];
  end
endmodule
