// dual_alu_cpu: 7-stage single-issue in-order MIPS-like pipeline with an early
// and a late ALU (the "dual-ALU" configuration).
//
// Stages: IF-1 (PC select, branch prediction), IF-2 (instruction array access),
// ID (decode, register read, ALU steering), EXE (early ALU, address
// generation, mult-1), DC-1 (data address phase, mult-2), DC-2 (data array
// access and store lane alignment, late ALU, mult-3), WB (load byte/halfword
// extraction, register write). A load's data, a product
// and a late-ALU result all exist from the end of DC-2; an early-ALU result
// from the end of EXE.
//
// How the two ALUs are used: an ALU operation goes to the early ALU unless one
// of its sources comes from a load, a multiply or a diverted operation among
// the two instructions ahead of it; then it is diverted to the late ALU,
// which receives load data with no delay. Load-use stalls therefore never
// occur. Only a load/store base or a multiply operand that depends on such a
// late result stalls issue (one or two cycles). Exactly one of the two ALUs
// executes an instruction; both can be busy in the same cycle. A branch is
// resolved by the ALU that executes it: a misprediction found in EXE costs
// three fetch slots, one found in DC-2 costs five. See alu_steer.
//
// Operands are read in ID and travel with the instruction; in EXE, DC-1 and
// DC-2 they are refreshed from the instructions ahead (fwd_mux), so the late
// ALU and the store data path see results produced after the instruction left
// ID. The back end (EXE..WB) never stalls: memories always hit.
//
// Interface: host ports load the instruction and data arrays while the core is
// held in reset. `retire` reports each retiring instruction's architectural
// effect; `ev` gives one-cycle event pulses (stalls, ALU use, mispredictions).
// BREAK stops fetch; `halted` rises once everything before it has retired.
// Instruction fetches that stay in the same 32-byte line on the sequential
// path are flagged (ic_seq_detect) as accesses that a set-associative
// instruction cache could serve by reading a single way.
//
// From the source: the stage list and placement of the AG, ALUs and multiplier
// stages, the steering rules, 128-entry bimodal predictor/BTB, 2-cycle
// instruction and data access. This design's choices: the instruction subset,
// no branch delay slot, the operand-refresh forwarding scheme, always-hit
// memory arrays in place of caches, the memory sizes (16 KiB each, the L1
// sizes), and the halt mechanism.
module dual_alu_cpu
  import dcpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS    = 4096,
  parameter int unsigned DMEM_WORDS    = 4096,
  parameter int unsigned BTB_ENTRIES   = 128,
  parameter int unsigned BIMOD_ENTRIES = 128,
  parameter logic [31:0] RESET_PC      = 32'h0,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host load ports (word addressed)
  input  logic           imem_ld_we,
  input  logic [IAW-1:0] imem_ld_addr,
  input  logic [31:0]    imem_ld_data,
  input  logic           dmem_ld_we,
  input  logic [DAW-1:0] dmem_ld_addr,
  input  logic [31:0]    dmem_ld_data,
  // status
  output logic           halted,
  output retire_t        retire,
  output perf_ev_t       ev
);

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] pnpc;      // predicted next PC
    logic        seq;       // pc was reached as PC+4 of the previous fetch
  } fe_t;

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] pnpc;
    ctrl_t       c;
    logic        late;      // executes in the late ALU
    logic [31:0] rs_v;
    logic [31:0] rt_v;
    logic [31:0] res;       // early result (early ALU), or address (load/store)
  } pipe_t;

  // ---------------------------------------------------------------- state
  logic [31:0] pc_f1;
  logic        seq_f1;
  logic        f2_v, id_v, ex_v, d1_v, d2_v, wb_v;
  fe_t         f2_q, id_q;
  pipe_t       ex_q, d1_q, d2_q, wb_q;

  // ---------------------------------------------------------------- control
  logic        stall_id, steer_stall, halt_wait;
  logic        flush_late, flush_early;
  logic [31:0] redirect_pc_late, redirect_pc_early;

  // ---------------------------------------------------------------- IF-1
  logic        bp_taken;
  logic [31:0] bp_npc;
  logic        bp_upd_v, bp_upd_cond, bp_upd_taken;
  logic [31:0] bp_upd_pc, bp_upd_target;

  bpred #(.BTB_ENTRIES(BTB_ENTRIES), .BIMOD_ENTRIES(BIMOD_ENTRIES)) u_bpred (
    .clk, .rst_n,
    .lk_pc(pc_f1), .lk_taken(bp_taken), .lk_target(bp_npc),
    .upd_valid(bp_upd_v), .upd_pc(bp_upd_pc), .upd_cond(bp_upd_cond),
    .upd_taken(bp_upd_taken), .upd_target(bp_upd_target)
  );

  // ---------------------------------------------------------------- IF-2
  logic [31:0] instr;

  sram_sp #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(!stall_id), .addr(f2_q.pc[IAW+1:2]), .be(4'b0000), .wdata('0),
    .rdata(instr),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  logic ic_single;

  ic_seq_detect #(.LINE_BYTES(32)) u_icseq (
    .clk, .rst_n, .acc_valid(f2_v && !stall_id), .acc_pc(f2_q.pc), .acc_seq(f2_q.seq),
    .single_way(ic_single)
  );

  // ---------------------------------------------------------------- ID
  ctrl_t       id_c;
  logic [31:0] rf_rs, rf_rt;
  logic        id_late;
  logic        wb_wen;
  logic [31:0] wb_val;

  decoder u_dec (.instr(instr), .pc(id_q.pc), .c(id_c));

  regfile u_rf (
    .clk, .rst_n,
    .ra1(id_c.rs), .ra2(id_c.rt), .rd1(rf_rs), .rd2(rf_rt),
    .we(wb_wen), .wa(wb_q.c.rd), .wd(wb_val)
  );

  // a result is late if it appears only at the end of DC-2
  function automatic logic late_result(input pipe_t p);
    return p.c.is_load || p.c.is_mul || p.late;
  endfunction

  alu_steer u_steer (
    .id_valid(id_v), .id_is_alu(id_c.is_alu),
    .id_is_mem(id_c.is_load || id_c.is_store), .id_is_mul(id_c.is_mul),
    .id_use_rs(id_c.use_rs), .id_use_rt(id_c.use_rt),
    .id_rs(id_c.rs), .id_rt(id_c.rt),
    .ex_wen(ex_v && ex_q.c.wen), .ex_rd(ex_q.c.rd), .ex_late(late_result(ex_q)),
    .d1_wen(d1_v && d1_q.c.wen), .d1_rd(d1_q.c.rd), .d1_late(late_result(d1_q)),
    .go_late(id_late), .stall(steer_stall)
  );

  // BREAK waits in ID until every older instruction has retired
  assign halt_wait = id_v && id_c.is_break;
  assign stall_id  = steer_stall || halt_wait;

  // ---------------------------------------------------------------- forwarding sources
  // index 0 is the nearest producer
  logic [2:0]       s_wen, s_rdy;
  logic [2:0][4:0]  s_rd;
  logic [2:0][31:0] s_val;

  always_comb begin
    s_wen[0] = d1_v && d1_q.c.wen;  s_rd[0] = d1_q.c.rd;
    s_rdy[0] = !late_result(d1_q);  s_val[0] = d1_q.res;
    s_wen[1] = d2_v && d2_q.c.wen;  s_rd[1] = d2_q.c.rd;
    s_rdy[1] = !late_result(d2_q);  s_val[1] = d2_q.res;
    s_wen[2] = wb_wen;              s_rd[2] = wb_q.c.rd;
    s_rdy[2] = 1'b1;                s_val[2] = wb_val;
  end

  // ---------------------------------------------------------------- EXE
  logic [31:0] ex_rs, ex_rt, ex_a, ex_b, ex_y, ex_addr, ex_res, ex_tgt, ex_npc;
  logic        ex_taken, ex_mis, ex_misal, ex_rs_rdy, ex_rt_rdy;
  logic [63:0] mul_p;

  fwd_mux #(.N(3)) u_fwd_ex_rs (
    .reg_i(ex_q.c.rs), .cur_i(ex_q.rs_v),
    .src_wen(s_wen), .src_rd(s_rd), .src_ready(s_rdy), .src_val(s_val),
    .val_o(ex_rs), .ready_o(ex_rs_rdy));
  fwd_mux #(.N(3)) u_fwd_ex_rt (
    .reg_i(ex_q.c.rt), .cur_i(ex_q.rt_v),
    .src_wen(s_wen), .src_rd(s_rd), .src_ready(s_rdy), .src_val(s_val),
    .val_o(ex_rt), .ready_o(ex_rt_rdy));

  assign ex_a = ex_q.c.a_shamt ? {27'd0, ex_q.c.shamt} : ex_rs;
  assign ex_b = ex_q.c.b_imm ? ex_q.c.imm : ex_rt;

  alu u_alu_early (.op(ex_q.c.alu_op), .br(ex_q.c.br), .a(ex_a), .b(ex_b),
                   .y(ex_y), .taken(ex_taken));

  agu u_agu (.base(ex_rs), .offset(ex_q.c.imm), .addr(ex_addr), .misaligned(ex_misal));

  mul3 u_mul (.clk, .a(ex_rs), .b(ex_rt), .p(mul_p));

  always_comb begin
    ex_tgt = (ex_q.c.br == BR_JR) ? ex_rs : ex_q.c.target;
    ex_npc = (ex_q.c.is_alu && ex_taken) ? ex_tgt : ex_q.pc + 32'd4;
    ex_mis = ex_v && !ex_q.late && (ex_npc != ex_q.pnpc);
    if (ex_q.c.is_load || ex_q.c.is_store) ex_res = ex_addr;
    else if (ex_q.c.is_link)               ex_res = ex_q.pc + 32'd4;
    else                                   ex_res = ex_y;
  end

  // ---------------------------------------------------------------- DC-1
  logic [31:0] d1_rs, d1_rt;

  fwd_mux #(.N(2)) u_fwd_d1_rs (
    .reg_i(d1_q.c.rs), .cur_i(d1_q.rs_v),
    .src_wen(s_wen[2:1]), .src_rd(s_rd[2:1]), .src_ready(s_rdy[2:1]), .src_val(s_val[2:1]),
    .val_o(d1_rs), .ready_o());
  fwd_mux #(.N(2)) u_fwd_d1_rt (
    .reg_i(d1_q.c.rt), .cur_i(d1_q.rt_v),
    .src_wen(s_wen[2:1]), .src_rd(s_rd[2:1]), .src_ready(s_rdy[2:1]), .src_val(s_val[2:1]),
    .val_o(d1_rt), .ready_o());

  // ---------------------------------------------------------------- DC-2
  logic [31:0] d2_rs, d2_rt, d2_a, d2_b, d2_y, d2_res, d2_tgt, d2_npc, dmem_rdata;
  logic        d2_taken, d2_rs_rdy, d2_rt_rdy, d2_st;

  fwd_mux #(.N(1)) u_fwd_d2_rs (
    .reg_i(d2_q.c.rs), .cur_i(d2_q.rs_v),
    .src_wen(s_wen[2]), .src_rd(s_rd[2]), .src_ready(s_rdy[2]), .src_val(s_val[2]),
    .val_o(d2_rs), .ready_o(d2_rs_rdy));
  fwd_mux #(.N(1)) u_fwd_d2_rt (
    .reg_i(d2_q.c.rt), .cur_i(d2_q.rt_v),
    .src_wen(s_wen[2]), .src_rd(s_rd[2]), .src_ready(s_rdy[2]), .src_val(s_val[2]),
    .val_o(d2_rt), .ready_o(d2_rt_rdy));

  assign d2_a = d2_q.c.a_shamt ? {27'd0, d2_q.c.shamt} : d2_rs;
  assign d2_b = d2_q.c.b_imm ? d2_q.c.imm : d2_rt;

  alu u_alu_late (.op(d2_q.c.alu_op), .br(d2_q.c.br), .a(d2_a), .b(d2_b),
                  .y(d2_y), .taken(d2_taken));

  assign d2_st = d2_v && d2_q.c.is_store;

  logic [3:0]  st_be;
  logic [31:0] st_word, ld_data;

  // store lanes (DC-2)
  lsu_align u_st_align (
    .size(d2_q.c.msize), .addr_lo(d2_q.res[1:0]), .st_data(d2_rt),
    .st_be(st_be), .st_word(st_word),
    .ld_uns(1'b0), .ld_word('0), .ld_data());

  sram_sp #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en(1'b1), .addr(d2_q.res[DAW+1:2]), .be(st_be & {4{d2_st}}), .wdata(st_word),
    .rdata(dmem_rdata),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_data(dmem_ld_data)
  );

  always_comb begin
    d2_tgt = (d2_q.c.br == BR_JR) ? d2_rs : d2_q.c.target;
    d2_npc = d2_taken ? d2_tgt : d2_q.pc + 32'd4;
    flush_late = d2_v && d2_q.late && (d2_npc != d2_q.pnpc);
    if (d2_q.late)         d2_res = d2_q.c.is_link ? d2_q.pc + 32'd4 : d2_y;
    else if (d2_q.c.is_mul) d2_res = mul_p[31:0];
    else                   d2_res = d2_q.res;
    redirect_pc_late  = d2_npc;
    redirect_pc_early = ex_npc;
    flush_early = ex_mis && !flush_late;
  end

  // predictor update: the older (DC-2) resolution wins; a younger one in EXE
  // is being flushed in that case anyway
  always_comb begin
    if (d2_v && d2_q.late && d2_q.c.br != BR_NONE) begin
      bp_upd_v      = 1'b1;
      bp_upd_pc     = d2_q.pc;
      bp_upd_cond   = !(d2_q.c.br inside {BR_J, BR_JR});
      bp_upd_taken  = d2_taken;
      bp_upd_target = d2_tgt;
    end else begin
      bp_upd_v      = ex_v && !ex_q.late && ex_q.c.is_alu && ex_q.c.br != BR_NONE
                      && !flush_late;
      bp_upd_pc     = ex_q.pc;
      bp_upd_cond   = !(ex_q.c.br inside {BR_J, BR_JR});
      bp_upd_taken  = ex_taken;
      bp_upd_target = ex_tgt;
    end
  end

  // ---------------------------------------------------------------- WB
  assign wb_wen = wb_v && wb_q.c.wen;
  // load extraction (WB)
  lsu_align u_ld_align (
    .size(wb_q.c.msize), .addr_lo(wb_q.res[1:0]), .st_data('0),
    .st_be(), .st_word(),
    .ld_uns(wb_q.c.ld_uns), .ld_word(dmem_rdata), .ld_data(ld_data));

  assign wb_val = wb_q.c.is_load ? ld_data : wb_q.res;

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f1  <= RESET_PC;
      seq_f1 <= 1'b0;
      f2_v   <= 1'b0;
      id_v   <= 1'b0;
      ex_v   <= 1'b0;
      d1_v   <= 1'b0;
      d2_v   <= 1'b0;
      wb_v   <= 1'b0;
      halted <= 1'b0;
    end else begin
      // back end: always advances
      wb_v <= d2_v;
      d2_v <= d1_v && !flush_late;
      d1_v <= ex_v && !flush_late;
      if (flush_late || flush_early) begin
        ex_v  <= 1'b0;
        id_v  <= 1'b0;
        f2_v  <= 1'b0;
        pc_f1 <= flush_late ? redirect_pc_late : redirect_pc_early;
        seq_f1 <= 1'b0;
      end else if (stall_id) begin
        ex_v  <= 1'b0;
      end else begin
        ex_v  <= id_v;
        id_v  <= f2_v;
        f2_v  <= !halted;
        pc_f1 <= bp_npc;
        seq_f1 <= !bp_taken;
      end
      if (halt_wait && !ex_v && !d1_v && !d2_v && !wb_v) halted <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    wb_q      <= d2_q;
    wb_q.res  <= d2_res;
    wb_q.rt_v <= d2_rt;
    d2_q      <= d1_q;
    d2_q.rs_v <= d1_rs;
    d2_q.rt_v <= d1_rt;
    d1_q      <= ex_q;
    d1_q.rs_v <= ex_rs;
    d1_q.rt_v <= ex_rt;
    d1_q.res  <= ex_res;
    if (!stall_id) begin
      ex_q <= '{pc: id_q.pc, pnpc: id_q.pnpc, c: id_c, late: id_late,
                rs_v: rf_rs, rt_v: rf_rt, res: '0};
      id_q <= f2_q;
      f2_q <= '{pc: pc_f1, pnpc: bp_npc, seq: seq_f1};
    end
  end

  // ---------------------------------------------------------------- status
  always_comb begin
    retire         = '0;
    retire.valid   = wb_v;
    retire.pc      = wb_q.pc;
    retire.wen     = wb_wen;
    retire.rd      = wb_q.c.rd;
    retire.wdata   = wb_val;
    retire.store   = wb_v && wb_q.c.is_store;
    retire.st_addr = wb_q.res;
    retire.st_data = wb_q.rt_v;
    retire.late    = wb_q.late;

    ev                  = '0;
    ev.retire           = wb_v;
    ev.early_alu        = ex_v && ex_q.c.is_alu && !ex_q.late && !flush_late;
    ev.late_alu         = d2_v && d2_q.late;
    ev.both_alus        = ev.early_alu && ev.late_alu;
    ev.ag_stall         = steer_stall && !flush_late && !flush_early;
    ev.mispredict_early = flush_early;
    ev.mispredict_late  = flush_late;
    ev.mul              = ex_v && ex_q.c.is_mul;
    ev.load             = d2_v && d2_q.c.is_load;
    ev.store            = d2_st;
    ev.ic_access        = f2_v && !stall_id;
    ev.ic_single_way    = ic_single;
  end

  // ---------------------------------------------------------------- checks
  // operands used in EXE (early ALU, AGU base, mult-1) must be final there;
  // a late ALU operation and a store's data must have theirs by DC-2
  always_ff @(posedge clk) begin
    if (rst_n && ex_v && !ex_q.late && !flush_late) begin
      assert (!(ex_q.c.use_rs && !ex_rs_rdy) &&
              !(ex_q.c.use_rt && !ex_rt_rdy && !ex_q.c.is_store))
        else $error("EXE operand not ready at pc %h", ex_q.pc);
    end
    if (rst_n && d2_v && (d2_q.late || d2_q.c.is_store)) begin
      assert (d2_rs_rdy && d2_rt_rdy)
        else $error("DC-2 operand not ready at pc %h", d2_q.pc);
    end
  end

endmodule
