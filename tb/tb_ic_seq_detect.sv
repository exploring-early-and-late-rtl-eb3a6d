// tb_ic_seq_detect: self-checking test of the sequential-fetch line tracker.
// Drives directed cases (line crossing, predictor target, redirect, idle
// cycles, reset) and a random fetch stream, and compares single_way with a
// model kept in the testbench.
module tb_ic_seq_detect;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        acc_valid, acc_seq;
  logic [31:0] acc_pc;
  logic        single_way;
  int checks = 0, failures = 0;

  ic_seq_detect dut (.*);

  always #5 clk = ~clk;
  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  // model state
  logic        m_valid;
  logic [31:0] m_line;

  task automatic access(input logic v, input logic [31:0] pc, input logic seq, input logic exp);
    acc_valid = v; acc_pc = pc; acc_seq = seq;
    #1;
    checks++;
    if (single_way !== exp) begin
      failures++;
      $display("FAIL: v=%0b pc=%h seq=%0b single_way=%0b expected %0b", v, pc, seq, single_way, exp);
    end
    @(posedge clk);
    #1;
  endtask

  // model-predicted access
  task automatic maccess(input logic v, input logic [31:0] pc, input logic seq);
    logic exp;
    exp = v && seq && m_valid && (pc[31:5] == m_line[31:5]);
    access(v, pc, seq, exp);
    if (v) begin m_valid = 1'b1; m_line = pc; end
  endtask

  initial begin
    logic [31:0] pc;
    logic        v, seq;
    int          r;
    acc_valid = 0; acc_pc = 0; acc_seq = 0;
    m_valid = 0; m_line = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed
    access(1, 32'h0000_0000, 1, 0);  // first access after reset: conventional
    access(1, 32'h0000_0004, 1, 1);  // same line, sequential
    access(0, 32'h0000_0008, 1, 0);  // no access
    access(1, 32'h0000_0008, 1, 1);  // idle cycle keeps the tracked line
    access(1, 32'h0000_001C, 1, 1);  // last word of the line
    access(1, 32'h0000_0020, 1, 0);  // next line: conventional
    access(1, 32'h0000_0024, 0, 0);  // predictor target in the same line: conventional
    access(1, 32'h0000_0028, 1, 1);
    access(1, 32'h0000_1028, 1, 0);  // same index bits, other line
    access(1, 32'h0000_102C, 1, 1);
    rst_n = 1'b0; #1 rst_n = 1'b1;
    access(1, 32'h0000_1030, 1, 0);  // tracked line lost at reset
    access(1, 32'h0000_1034, 1, 1);
    m_valid = 1; m_line = 32'h0000_1034;

    // random stream: mostly sequential, with jumps and idle cycles
    pc = 32'h0000_0100;
    for (int i = 0; i < 20000; i++) begin
      r = $urandom % 16;
      v = (r != 0);
      seq = 1'b1;
      if (r == 1) begin pc = {$urandom} & 32'h0000_3FFC; seq = 1'b0; end
      else if (r == 2) begin pc = pc + 32'(($urandom % 8) * 4); seq = 1'b0; end
      else if (r == 3) begin seq = ($urandom % 2) == 0; end   // repeated fetch of the same PC
      maccess(v, pc, seq);
      if (v && r != 3) pc = pc + 4;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
