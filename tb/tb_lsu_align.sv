// tb_lsu_align: self-checking test of the byte/halfword alignment unit. For
// every size, address offset and signedness, random words are checked: store
// byte enables and lane data are compared with a byte-by-byte model, and the
// extracted load value with a shift-and-extend model.
module tb_lsu_align;
  import dcpu_pkg::*;
  msize_e size;
  logic [1:0] addr_lo;
  logic [31:0] st_data, st_word, ld_word, ld_data;
  logic [3:0] st_be;
  logic ld_uns;
  int checks = 0, failures = 0;

  lsu_align dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) begin
      for (int s = 0; s < 3; s++)
        for (int o = 0; o < 4; o++)
          for (int u = 0; u < 2; u++) begin
            logic [3:0] ebe;
            logic [31:0] sh, ev;
            int nb;
            size = msize_e'(s); addr_lo = 2'(o); ld_uns = u[0];
            st_data = $urandom; ld_word = $urandom;
            #1;
            nb = (s == 0) ? 1 : (s == 1) ? 2 : 4;
            // bytes covered: the naturally aligned group containing offset o
            ebe = '0;
            for (int k = 0; k < 4; k++) if (k / nb == o / nb) ebe[k] = 1'b1;
            checks++;
            if (st_be !== ebe) begin failures++; $display("FAIL be s%0d o%0d %b", s, o, st_be); end
            for (int k = 0; k < 4; k++)
              if (ebe[k]) begin
                checks++;
                if (st_word[8*k +: 8] !== st_data[8*(k % nb) +: 8]) begin
                  failures++; $display("FAIL lane s%0d o%0d k%0d", s, o, k);
                end
              end
            sh = ld_word >> (8 * (o / nb * nb));
            if (nb == 1)      ev = u ? {24'd0, sh[7:0]}  : {{24{sh[7]}}, sh[7:0]};
            else if (nb == 2) ev = u ? {16'd0, sh[15:0]} : {{16{sh[15]}}, sh[15:0]};
            else              ev = ld_word;
            checks++;
            if (ld_data !== ev) begin failures++; $display("FAIL load s%0d o%0d u%0d %h exp %h", s, o, u, ld_data, ev); end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
