// alu_steer: dual-ALU steering and issue interlock, evaluated in ID.
//
// A result is "late" when it is produced at the end of DC-2: loads, multiplies
// and ALU operations that were themselves sent to the late ALU. Such a result
// can be forwarded to EXE only once its producer is at least three
// instructions ahead. For the instruction in ID this unit checks the two
// instructions ahead of it (now in EXE and DC-1, i.e. the ones it would meet
// as distance-1 and distance-2 producers) and finds, per source register, the
// nearest writer:
//   * an ALU operation (including branches and jumps) with a late nearest
//     producer of any source is diverted to the late ALU (go_late);
//     otherwise it uses the early ALU;
//   * a load or store whose base register has a late nearest producer, or a
//     multiply with such an operand, cannot be diverted (address generation and
//     mult-1 sit in EXE) and stalls issue for one cycle (stall); a store's data
//     operand is needed only in DC-2 and never stalls.
// Operations that depend on a diverted operation are diverted in turn, because
// the diverted operation is itself a late producer. Combinational.
module alu_steer
  import dcpu_pkg::*;
(
  input  logic       id_valid,
  input  logic       id_is_alu,
  input  logic       id_is_mem,    // load or store
  input  logic       id_is_mul,
  input  logic       id_use_rs,
  input  logic       id_use_rt,
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  // distance-1 producer (instruction in EXE)
  input  logic       ex_wen,       // valid and writes ex_rd
  input  logic [4:0] ex_rd,
  input  logic       ex_late,
  // distance-2 producer (instruction in DC-1)
  input  logic       d1_wen,
  input  logic [4:0] d1_rd,
  input  logic       d1_late,
  output logic       go_late,
  output logic       stall
);
  function automatic logic pending(input logic [4:0] r, input logic e_w,
                                   input logic [4:0] e_rd, input logic e_l,
                                   input logic d_w, input logic [4:0] d_rd,
                                   input logic d_l);
    if (r == 5'd0)              return 1'b0;
    if (e_w && e_rd == r)       return e_l;
    if (d_w && d_rd == r)       return d_l;
    return 1'b0;
  endfunction

  logic rs_p, rt_p;

  always_comb begin
    rs_p    = id_use_rs && pending(id_rs, ex_wen, ex_rd, ex_late, d1_wen, d1_rd, d1_late);
    rt_p    = id_use_rt && pending(id_rt, ex_wen, ex_rd, ex_late, d1_wen, d1_rd, d1_late);
    go_late = id_valid && id_is_alu && (rs_p || rt_p);
    stall   = id_valid && ((id_is_mem && rs_p) || (id_is_mul && (rs_p || rt_p)));
  end
endmodule
