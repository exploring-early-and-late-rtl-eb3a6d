// tb_sram_sp: self-checking test of the memory array against a model: host
// loads, reads registered one edge after the address, read data held while
// en is low, byte-enable writes with read-old-data behaviour.
module tb_sram_sp;
  localparam int W = 256;
  logic clk = 0, en, ld_we;
  logic [7:0] addr, ld_addr;
  logic [3:0] be;
  logic [31:0] wdata, rdata, ld_data, exp_rd;
  logic [31:0] m [W];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(W)) dut (.clk, .en, .addr, .be, .wdata, .rdata, .ld_we, .ld_addr, .ld_data);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; ld_we = 0; be = 0; addr = 0; wdata = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 8'(i); ld_data = $urandom; m[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    en = 1; addr = 0; be = 0;
    @(posedge clk); #1 exp_rd = m[0];
    repeat (5000) begin
      @(negedge clk);
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        if (failures < 10) $display("FAIL rdata %h exp %h", rdata, exp_rd);
      end
      en = ($urandom % 4) != 0; addr = 8'($urandom); wdata = $urandom;
      be = ($urandom % 3 == 0) ? 4'($urandom) : 4'b0;
      @(posedge clk);
      if (en) begin
        exp_rd = m[addr];
        for (int k = 0; k < 4; k++) if (be[k]) m[addr][8*k +: 8] = wdata[8*k +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
