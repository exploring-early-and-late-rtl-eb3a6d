// ic_seq_detect: sequential-fetch line tracker for single-way instruction
// fetches.
//
// Tracks the line address of the last instruction-array access. An access is
// marked single_way when its PC was reached sequentially (PC+4, not a
// predicted-taken target and not a redirect after a misprediction) and falls
// in the same line as the previous access. In a set-associative instruction
// cache the way found for that line can then be reused, so only one data way
// has to be read. Every other access (new line, predictor target, redirect,
// first access after reset) is a conventional access. Here the instruction
// memory is an always-hit array, so the result is reported as an event for
// energy accounting and does not change what is fetched.
//
// Timing: acc_valid/acc_pc/acc_seq describe the access made at the end of the
// current cycle (IF-2); single_way is combinational for that access and the
// tracked line is updated at the same edge. LINE_BYTES follows the 32-byte
// line of the source's L1 caches.
module ic_seq_detect #(
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned OFS = $clog2(LINE_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acc_valid,  // an instruction-array access happens this cycle
  input  logic [31:0] acc_pc,
  input  logic        acc_seq,    // PC came from PC+4 of the previous fetch
  output logic        single_way
);
  logic [31-OFS:0] last_line;
  logic            last_valid;

  assign single_way = acc_valid && acc_seq && last_valid && (acc_pc[31:OFS] == last_line);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_valid <= 1'b0;
      last_line  <= '0;
    end else if (acc_valid) begin
      last_valid <= 1'b1;
      last_line  <= acc_pc[31:OFS];
    end
  end
endmodule
