// bpred: bimodal branch predictor with a branch target buffer, used in IF-1.
//
// Lookup (combinational, IF-1): the fetch PC indexes a direct-mapped BTB and a
// table of 2-bit saturating counters (the "bimod" scheme). On a BTB hit the
// fetch is redirected to the stored target when the entry is an unconditional
// transfer or when the counter's upper bit predicts taken; otherwise the next
// fetch is PC+4.
// Update (at the clock edge, from the stage that resolved the instruction): a
// conditional branch trains its counter towards its outcome; any taken control
// transfer writes its target and kind into the BTB.
// Both tables have 128 entries, as given for the predictor and BTB. Direct
// mapping, PC[8:2] indexing, full tags and the weakly-not-taken reset value
// are this design's choices.
module bpred #(
  parameter int unsigned BTB_ENTRIES   = 128,
  parameter int unsigned BIMOD_ENTRIES = 128,
  localparam int unsigned BI = $clog2(BTB_ENTRIES),
  localparam int unsigned CI = $clog2(BIMOD_ENTRIES),
  localparam int unsigned TW = 30 - BI
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic [31:0] lk_pc,
  output logic        lk_taken,
  output logic [31:0] lk_target,
  // update
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic        upd_cond,     // conditional branch
  input  logic        upd_taken,
  input  logic [31:0] upd_target
);
  typedef struct packed {
    logic          valid;
    logic          cond;
    logic [TW-1:0] tag;
    logic [31:0]   target;
  } btb_ent_t;

  btb_ent_t   btb [BTB_ENTRIES];
  logic [1:0] ctr [BIMOD_ENTRIES];

  logic [BI-1:0] lk_bi, up_bi;
  logic [CI-1:0] lk_ci, up_ci;
  btb_ent_t      e;
  logic          hit;

  always_comb begin
    lk_bi     = lk_pc[2 +: BI];
    lk_ci     = lk_pc[2 +: CI];
    up_bi     = upd_pc[2 +: BI];
    up_ci     = upd_pc[2 +: CI];
    e         = btb[lk_bi];
    hit       = e.valid && (e.tag == lk_pc[31 -: TW]);
    lk_taken  = hit && (!e.cond || ctr[lk_ci][1]);
    lk_target = lk_taken ? e.target : lk_pc + 32'd4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BIMOD_ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (upd_valid && upd_cond) begin
      if (upd_taken && ctr[up_ci] != 2'b11)       ctr[up_ci] <= ctr[up_ci] + 2'd1;
      else if (!upd_taken && ctr[up_ci] != 2'b00) ctr[up_ci] <= ctr[up_ci] - 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BTB_ENTRIES; i++) btb[i] <= '0;
    end else if (upd_valid && upd_taken) begin
      btb[up_bi] <= '{valid: 1'b1, cond: upd_cond, tag: upd_pc[31 -: TW],
                      target: upd_target};
    end
  end
endmodule
