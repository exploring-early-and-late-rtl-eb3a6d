// mul3: three-stage pipelined 32 x 32 -> 64-bit unsigned/low-word multiplier.
//
// The pipeline's multiplier spans the stages mult-1 (alongside EXE), mult-2
// (DC-1) and mult-3 (DC-2). Operands enter in mult-1, where the four 16 x 16
// partial products are formed and registered; mult-2 adds the two middle
// partial products and registers them with the outer ones; mult-3 adds the
// aligned terms combinationally, so the product is valid in the third cycle and
// is registered by the following pipeline register (end of DC-2). The split
// into stages is this design's choice; the source gives only the three stages.
// The unit advances every cycle (the back end of the pipeline never stalls).
// The low 32 bits of the product are the result of MIPS32 MUL, which is the
// same for signed and unsigned operands.
//
//   cycle t   : a, b presented (mult-1)
//   cycle t+2 : p valid (mult-3)
module mul3 (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);
  logic [31:0] ll_q, lh_q, hl_q, hh_q;   // mult-1 -> mult-2
  logic [31:0] ll_q2, hh_q2;             // mult-2 -> mult-3
  logic [32:0] mid_q2;

  always_ff @(posedge clk) begin
    ll_q   <= a[15:0]  * b[15:0];
    lh_q   <= a[15:0]  * b[31:16];
    hl_q   <= a[31:16] * b[15:0];
    hh_q   <= a[31:16] * b[31:16];
    ll_q2  <= ll_q;
    hh_q2  <= hh_q;
    mid_q2 <= {1'b0, lh_q} + {1'b0, hl_q};
  end

  always_comb p = {hh_q2, ll_q2} + {15'd0, mid_q2, 16'd0};
endmodule
