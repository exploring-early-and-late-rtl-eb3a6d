// fwd_mux: operand forwarding for one source operand at one pipeline stage.
//
// Each instruction carries its two operand values down the pipeline, read from
// the register file in ID, and refreshes them in EXE, DC-1 and DC-2 from the
// older instructions ahead of it. This unit looks at those instructions
// (index 0 = the nearest/youngest) and takes the value of the nearest one
// that writes the operand's register. If that nearest writer has not produced
// its result yet (a load, multiply or late-ALU operation before WB), the
// operand is left unchanged and marked not ready; it is picked up at a later
// stage, and the steering logic guarantees it arrives before it is used.
// Register 0 is never forwarded. Combinational.
module fwd_mux #(
  parameter int unsigned N = 3
) (
  input  logic [4:0]  reg_i,
  input  logic [31:0] cur_i,       // value carried so far
  input  logic [N-1:0]       src_wen,    // source is valid and writes src_rd
  input  logic [N-1:0][4:0]  src_rd,
  input  logic [N-1:0]       src_ready,  // source's result exists
  input  logic [N-1:0][31:0] src_val,
  output logic [31:0] val_o,
  output logic        ready_o      // value is final as far as these sources go
);
  always_comb begin
    logic found;
    found   = 1'b0;
    val_o   = cur_i;
    ready_o = 1'b1;
    for (int i = 0; i < N; i++) begin
      if (!found && reg_i != 5'd0 && src_wen[i] && src_rd[i] == reg_i) begin
        found   = 1'b1;
        ready_o = src_ready[i];
        if (src_ready[i]) val_o = src_val[i];
      end
    end
  end
endmodule
