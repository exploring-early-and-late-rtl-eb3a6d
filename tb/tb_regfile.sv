// tb_regfile: self-checking test of the register file against an array model:
// reset to zero, random writes and reads on both ports, register 0 staying
// zero, and same-cycle write-through to a reader.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] m [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    #12 rst_n = 1;
    foreach (m[i]) m[i] = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      chk(rd1, 0, "reset"); chk(rd2, 0, "reset");
    end
    repeat (3000) begin
      @(negedge clk);
      we = $urandom % 2; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      #1;
      chk(rd1, (ra1 == 0) ? 0 : (we && wa == ra1) ? wd : m[ra1], "port1");
      chk(rd2, (ra2 == 0) ? 0 : (we && wa == ra2) ? wd : m[ra2], "port2");
      @(posedge clk);
      if (we && wa != 0) m[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
