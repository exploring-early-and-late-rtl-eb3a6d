// tb_mul3: self-checking test of the three-stage multiplier. A new operand pair
// enters every cycle; each product must appear exactly two clock edges later
// (valid in the third cycle, mult-3) and equal the 64-bit product computed here.
module tb_mul3;
  logic clk = 0;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;

  mul3 dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] va [1000];
    logic [31:0] vb [1000];
    foreach (va[i]) begin va[i] = $urandom; vb[i] = $urandom; end
    va[0] = 32'hFFFF_FFFF; vb[0] = 32'hFFFF_FFFF;
    va[1] = 0;             vb[1] = 32'h1234_5678;
    va[2] = 32'h8000_0000; vb[2] = 2;
    for (int i = 0; i < 1002; i++) begin
      @(negedge clk);
      // product of the pair applied two edges ago must be on p now
      if (i >= 2) begin
        checks++;
        if (p !== 64'(va[i-2]) * 64'(vb[i-2])) begin
          failures++;
          if (failures < 10) $display("FAIL %h * %h = %h", va[i-2], vb[i-2], p);
        end
      end
      if (i < 1000) begin a = va[i]; b = vb[i]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
