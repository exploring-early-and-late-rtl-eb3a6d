// lsu_align: byte/halfword alignment for the data memory (DC-2 and WB).
//
// Store side (DC-2): from the access size and the low two address bits, forms
// the byte enables of the 32-bit data word and replicates the store data into
// every lane (little-endian byte numbering: byte 0 is bits 7:0).
// Load side (WB): picks the addressed byte or halfword out of the word read
// from the array and sign- or zero-extends it. Combinational. Misaligned
// halfword/word accesses are not trapped: the low address bits below the
// access size are ignored. Byte order and the absence of alignment traps are
// choices of this design.
module lsu_align
  import dcpu_pkg::*;
(
  input  msize_e      size,
  input  logic [1:0]  addr_lo,
  // store
  input  logic [31:0] st_data,
  output logic [3:0]  st_be,
  output logic [31:0] st_word,
  // load
  input  logic        ld_uns,
  input  logic [31:0] ld_word,
  output logic [31:0] ld_data
);
  logic [7:0]  ld_b;
  logic [15:0] ld_h;

  always_comb begin
    unique case (size)
      MS_BYTE: begin
        st_be   = 4'b0001 << addr_lo;
        st_word = {4{st_data[7:0]}};
      end
      MS_HALF: begin
        st_be   = addr_lo[1] ? 4'b1100 : 4'b0011;
        st_word = {2{st_data[15:0]}};
      end
      default: begin
        st_be   = 4'b1111;
        st_word = st_data;
      end
    endcase

    ld_b = ld_word[8*addr_lo +: 8];
    ld_h = addr_lo[1] ? ld_word[31:16] : ld_word[15:0];
    unique case (size)
      MS_BYTE: ld_data = {{24{ld_b[7] & !ld_uns}}, ld_b};
      MS_HALF: ld_data = {{16{ld_h[15] & !ld_uns}}, ld_h};
      default: ld_data = ld_word;
    endcase
  end
endmodule
