// tb_fwd_mux: self-checking test of the forwarding selector with three
// sources: random register numbers over a small set (so several sources often
// write the same register) are compared with the rule "the nearest writer
// wins; if it is not ready the carried value stays and the operand is not
// ready; register 0 is never forwarded".
module tb_fwd_mux;
  logic [4:0] reg_i;
  logic [31:0] cur_i, val_o;
  logic [2:0] src_wen, src_ready;
  logic [2:0][4:0] src_rd;
  logic [2:0][31:0] src_val;
  logic ready_o;
  int checks = 0, failures = 0;

  fwd_mux #(.N(3)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) begin
      logic [31:0] ev;
      bit er;
      int k;
      reg_i = 5'($urandom % 4); cur_i = $urandom;
      for (int i = 0; i < 3; i++) begin
        src_wen[i] = $urandom % 2; src_ready[i] = $urandom % 2;
        src_rd[i] = 5'($urandom % 4); src_val[i] = $urandom;
      end
      #1;
      ev = cur_i; er = 1; k = -1;
      if (reg_i != 0)
        for (int i = 2; i >= 0; i--)
          if (src_wen[i] && src_rd[i] == reg_i) k = i;
      if (k >= 0) begin
        er = src_ready[k];
        if (src_ready[k]) ev = src_val[k];
      end
      checks++;
      if (val_o !== ev || ready_o !== er) begin
        failures++;
        if (failures < 10) $display("FAIL reg %0d got %h/%b exp %h/%b", reg_i, val_o, ready_o, ev, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
