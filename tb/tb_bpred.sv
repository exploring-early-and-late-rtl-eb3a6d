// tb_bpred: self-checking test of the bimodal predictor and BTB against a
// model kept here: cold lookups fall through, a taken branch is learned,
// the 2-bit counter needs two not-taken outcomes to flip, unconditional
// transfers always predict taken, and PCs that share an index but differ in
// tag do not hit. Then random update/lookup traffic against the model.
module tb_bpred;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, lk_target, upd_pc, upd_target;
  logic lk_taken, upd_valid, upd_cond, upd_taken;
  int checks = 0, failures = 0;

  bpred dut (.clk, .rst_n, .lk_pc, .lk_taken, .lk_target,
             .upd_valid, .upd_pc, .upd_cond, .upd_taken, .upd_target);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  bit          mv [128];
  bit          mc [128];
  logic [22:0] mt [128];
  logic [31:0] mtg [128];
  logic [1:0]  ctr [128];

  task automatic look(logic [31:0] pc, bit exp_t, logic [31:0] exp_tg, string what);
    lk_pc = pc; #1;
    checks++;
    if (lk_taken !== exp_t || lk_target !== exp_tg) begin
      failures++;
      if (failures < 10) $display("FAIL %s pc %h: %b %h, expected %b %h", what, pc, lk_taken, lk_target, exp_t, exp_tg);
    end
  endtask

  task automatic upd(logic [31:0] pc, bit cond, bit tk, logic [31:0] tg);
    int i;
    @(negedge clk);
    upd_valid = 1; upd_pc = pc; upd_cond = cond; upd_taken = tk; upd_target = tg;
    @(posedge clk); #1;
    upd_valid = 0;
    i = pc[8:2];
    if (cond) begin
      if (tk && ctr[i] != 3) ctr[i]++;
      else if (!tk && ctr[i] != 0) ctr[i]--;
    end
    if (tk) begin mv[i] = 1; mc[i] = cond; mt[i] = pc[31:9]; mtg[i] = tg; end
  endtask

  function automatic bit mpred(logic [31:0] pc, output logic [31:0] tg);
    int i;
    bit t;
    i = pc[8:2];
    t = mv[i] && mt[i] == pc[31:9] && (!mc[i] || ctr[i][1]);
    tg = t ? mtg[i] : pc + 4;
    return t;
  endfunction

  initial begin
    logic [31:0] tg;
    upd_valid = 0; upd_pc = 0; upd_cond = 0; upd_taken = 0; upd_target = 0; lk_pc = 0;
    foreach (ctr[i]) begin ctr[i] = 1; mv[i] = 0; end
    #12 rst_n = 1;
    look(32'h100, 0, 32'h104, "cold");
    upd(32'h100, 1, 1, 32'h400);
    look(32'h100, 1, 32'h400, "learned taken");
    upd(32'h100, 1, 0, 32'h400);
    look(32'h100, 0, 32'h104, "weakly not taken");
    upd(32'h100, 1, 1, 32'h400);
    upd(32'h100, 1, 1, 32'h400);
    upd(32'h100, 1, 0, 32'h400);
    look(32'h100, 1, 32'h400, "strongly taken survives one not-taken");
    upd(32'h300, 0, 1, 32'h40);
    look(32'h300, 1, 32'h40, "jump");
    look(32'h300 + 32'h200, 0, 32'h504, "tag mismatch");
    // random traffic in a small PC range (aliasing)
    repeat (3000) begin
      logic [31:0] pc;
      bit t;
      pc = {22'h0, 8'($urandom), 2'b00} + (($urandom % 2) ? 32'h1000 : 0);
      if ($urandom % 2) upd(pc, $urandom % 4 != 0, $urandom % 3 != 0, {$urandom} & ~32'h3);
      else begin
        t = mpred(pc, tg);
        look(pc, t, tg, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
