// tb_agu: self-checking test of the address generation unit: base plus
// sign-extended offset, and the misalignment flag, for corner and random
// values. Combinational.
module tb_agu;
  logic [31:0] base, offset, addr;
  logic misaligned;
  int checks = 0, failures = 0;

  agu dut (.base, .offset, .addr, .misaligned);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(logic [31:0] bs, logic [15:0] off);
    longint unsigned s;
    base = bs; offset = {{16{off[15]}}, off};
    #1;
    s = (longint'(bs) + longint'($signed(off))) & 64'hFFFF_FFFF;
    checks++;
    if (addr !== s[31:0] || misaligned !== (s[1:0] != 0)) begin
      failures++;
      $display("FAIL base=%h off=%h addr=%h", bs, off, addr);
    end
  endtask

  initial begin
    t(32'h100, 16'd100);
    t(32'h100, 16'hFFFC);
    t(32'h0, 16'h8000);
    t(32'hFFFF_FFFF, 16'h0001);
    t(32'h3, 16'h1);
    repeat (1000) t($urandom, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
