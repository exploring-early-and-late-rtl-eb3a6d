// sram_sp: synchronous single-port memory array with byte write enables.
//
// Stands for the array part of the instruction and data memories. A read
// registers mem[addr] into rdata at the clock edge when en is high, and rdata
// holds while en is low (so a stalled fetch keeps its instruction). A write
// with be != 0 updates the selected bytes at the same edge; the read returns
// the old word. In the pipeline the address is formed in the first access
// stage (IF-1 / DC-1) and the array is read or written at the end of the second
// (IF-2 / DC-2), which gives the 2-cycle access of the source's memories. The
// memories are always-hit arrays: the source's pipeline RTL has no caches.
// A second, write-only port (ld_*) lets a host load the array; it has priority.
module sram_sp #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [31:0]   ld_data
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      mem[ld_addr] <= ld_data;
    end else if (en) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
    end
    if (en) rdata <= mem[addr];
  end
endmodule
