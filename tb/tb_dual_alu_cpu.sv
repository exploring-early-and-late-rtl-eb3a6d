// tb_dual_alu_cpu: end-to-end test of the dual-ALU pipeline at its default size.
//
// Programs are assembled in the testbench, loaded through the host ports while
// the core is in reset, and run until BREAK halts the core. An instruction-set
// reference model written here executes the same program one instruction at a
// time and is compared with every retiring instruction (PC, register write,
// store address and data). Programs:
//   1. the loop of load/ALU/branch code of the dual-ALU example: checks which
//      ALU executes each operation and that it runs with no issue stalls;
//   2. timing pairs: a load-use chain costs no cycle, an address generation
//      that needs a late result at distance 1 / 2 costs 2 / 1 cycles, and a
//      misprediction resolved in the late ALU costs 2 cycles more than one
//      resolved in the early ALU;
//   3. random programs (ALU, shifts, word/halfword/byte loads and stores,
//      stores and loads with computed bases,
//      multiplies, forward branches, calls/returns) in counted loops;
//   4. two kernels in the style of embedded benchmarks, a table-driven CRC-32
//      and a bit count, checked against golden results computed here and
//      against the late-ALU and stall counts the steering rules predict.
// The straight-line baseline of 2. also checks that exactly one fetch per
// 32-byte line is a conventional (not single-way) instruction access.
// Each pipeline mechanism (early/late ALU, both in one cycle, AG stall, early
// and late misprediction, multiply, load, store, single-way and conventional
// fetch) must occur at least once.
module tb_dual_alu_cpu;
  import dcpu_pkg::*;

  localparam int unsigned IW = 4096;
  localparam int unsigned DW = 4096;

  logic clk = 1'b0;
  logic rst_n;
  logic imem_ld_we, dmem_ld_we;
  logic [11:0] imem_ld_addr, dmem_ld_addr;
  logic [31:0] imem_ld_data, dmem_ld_data;
  logic halted;
  retire_t retire;
  perf_ev_t ev;

  dual_alu_cpu dut (
    .clk, .rst_n,
    .imem_ld_we, .imem_ld_addr, .imem_ld_data,
    .dmem_ld_we, .dmem_ld_addr, .dmem_ld_data,
    .halted, .retire, .ev
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  logic [31:0] prog [IW];
  logic [31:0] dinit [DW];
  int np;

  function automatic logic [31:0] R(input logic [5:0] fn, input int rs, rt, rd, sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rs, rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] MULI(input int rd, rs, rt);
    return {6'h1C, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02};
  endfunction
  function automatic logic [31:0] JI(input logic [5:0] op, input int word_target);
    return {op, 26'(word_target)};
  endfunction
  localparam logic [31:0] BRK = 32'h0000_000D;

  task automatic emit(input logic [31:0] w);
    prog[np] = w;
    np++;
  endtask

  // ------------------------------------------------------------ reference model
  logic [31:0] gr [32];
  logic [31:0] dm [DW];
  logic [31:0] ipc;

  // execute one instruction; report its effect
  task automatic iss_step(output bit wen, output int rd, output logic [31:0] wd,
                          output bit st, output logic [31:0] sa, output logic [31:0] sd,
                          output bit brk);
    logic [31:0] w, a, b, simm, zimm, npc;
    logic [5:0] op, fn;
    int rs, rt, rdd, sh;
    w = prog[ipc[13:2]];
    op = w[31:26]; fn = w[5:0];
    rs = w[25:21]; rt = w[20:16]; rdd = w[15:11]; sh = w[10:6];
    a = gr[rs]; b = gr[rt];
    simm = {{16{w[15]}}, w[15:0]}; zimm = {16'd0, w[15:0]};
    npc = ipc + 4;
    wen = 0; rd = 0; wd = 0; st = 0; sa = 0; sd = 0; brk = 0;
    case (op)
      6'h00: begin
        wen = 1; rd = rdd;
        case (fn)
          6'h20, 6'h21: wd = a + b;
          6'h22, 6'h23: wd = a - b;
          6'h24: wd = a & b;
          6'h25: wd = a | b;
          6'h26: wd = a ^ b;
          6'h27: wd = ~(a | b);
          6'h2A: wd = ($signed(a) < $signed(b)) ? 1 : 0;
          6'h2B: wd = (a < b) ? 1 : 0;
          6'h00: wd = b << sh;
          6'h02: wd = b >> sh;
          6'h03: wd = $signed(b) >>> sh;
          6'h04: wd = b << a[4:0];
          6'h06: wd = b >> a[4:0];
          6'h07: wd = $signed(b) >>> a[4:0];
          6'h08: begin wen = 0; npc = a; end
          6'h09: begin wd = ipc + 4; npc = a; end
          6'h0D: begin wen = 0; brk = 1; end
          default: wen = 0;
        endcase
      end
      6'h1C: begin wen = 1; rd = rdd; wd = a * b; end
      6'h01: if ((rt == 0 && a[31]) || (rt == 1 && !a[31])) npc = ipc + 4 + (simm << 2);
      6'h02: npc = {npc[31:28], w[25:0], 2'b00};
      6'h03: begin wen = 1; rd = 31; wd = ipc + 4; npc = {npc[31:28], w[25:0], 2'b00}; end
      6'h04: if (a == b) npc = ipc + 4 + (simm << 2);
      6'h05: if (a != b) npc = ipc + 4 + (simm << 2);
      6'h06: if ($signed(a) <= 0) npc = ipc + 4 + (simm << 2);
      6'h07: if ($signed(a) > 0) npc = ipc + 4 + (simm << 2);
      6'h08, 6'h09: begin wen = 1; rd = rt; wd = a + simm; end
      6'h0A: begin wen = 1; rd = rt; wd = ($signed(a) < $signed(simm)) ? 1 : 0; end
      6'h0B: begin wen = 1; rd = rt; wd = (a < simm) ? 1 : 0; end
      6'h0C: begin wen = 1; rd = rt; wd = a & zimm; end
      6'h0D: begin wen = 1; rd = rt; wd = a | zimm; end
      6'h0E: begin wen = 1; rd = rt; wd = a ^ zimm; end
      6'h0F: begin wen = 1; rd = rt; wd = {w[15:0], 16'd0}; end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
        logic [31:0] ea, mw;
        ea = a + simm;
        mw = dm[ea >> 2 & (DW - 1)];
        wen = 1; rd = rt;
        case (op)
          6'h20: wd = {{24{mw[8*ea[1:0]+7]}}, mw[8*ea[1:0] +: 8]};
          6'h24: wd = {24'd0, mw[8*ea[1:0] +: 8]};
          6'h21: wd = {{16{mw[16*ea[1]+15]}}, mw[16*ea[1] +: 16]};
          6'h25: wd = {16'd0, mw[16*ea[1] +: 16]};
          default: wd = mw;
        endcase
      end
      6'h28, 6'h29, 6'h2B: begin
        logic [31:0] mw;
        st = 1; sa = a + simm; sd = b;
        mw = dm[sa >> 2 & (DW - 1)];
        case (op)
          6'h28: mw[8*sa[1:0] +: 8] = b[7:0];
          6'h29: mw[16*sa[1] +: 16] = b[15:0];
          default: mw = b;
        endcase
        dm[sa >> 2 & (DW - 1)] = mw;
      end
      default: ;
    endcase
    if (rd == 0) wen = 0;
    if (wen) gr[rd] = wd;
    ipc = npc;
  endtask

  // ------------------------------------------------------------ run one program
  int n_ev [string];
  int run_cycles, run_stalls, run_retired, run_both, run_icacc, run_icsingle;
  logic [31:0] late_pc [$];   // retired PCs executed in the late ALU
  logic [31:0] early_pc [$];  // retired ALU PCs executed in the early ALU

  function automatic bit is_alu_word(input logic [31:0] w);
    logic [5:0] op;
    op = w[31:26];
    if (op == 6'h00) return w[5:0] != 6'h0D;
    return !(op inside {6'h1C, 6'h20, 6'h21, 6'h23, 6'h24, 6'h25, 6'h28, 6'h29, 6'h2B});
  endfunction

  task automatic run_program(input string name);
    bit wen, st, brk;
    int rd, t0;
    logic [31:0] wd, sa, sd;
    bit done;
    late_pc.delete();
    early_pc.delete();
    rst_n = 1'b0;
    imem_ld_we = 0; dmem_ld_we = 0;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_ld_we = 1; imem_ld_addr = 12'(i); imem_ld_data = (i < np) ? prog[i] : 32'h0;
      dmem_ld_we = 1; dmem_ld_addr = 12'(i); dmem_ld_data = dinit[i];
      @(negedge clk);
    end
    imem_ld_we = 0; dmem_ld_we = 0;
    for (int i = np; i < IW; i++) prog[i] = 32'h0;
    for (int i = 0; i < 32; i++) gr[i] = 0;
    for (int i = 0; i < DW; i++) dm[i] = dinit[i];
    ipc = 0;
    run_stalls = 0; run_retired = 0; run_both = 0; run_icacc = 0; run_icsingle = 0;
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    done = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (ev.ag_stall)         begin run_stalls++; n_ev["ag_stall"]++; end
      if (ev.early_alu)        n_ev["early_alu"]++;
      if (ev.late_alu)         n_ev["late_alu"]++;
      if (ev.both_alus)        begin run_both++; n_ev["both_alus"]++; end
      if (ev.mispredict_early) n_ev["mispredict_early"]++;
      if (ev.mispredict_late)  n_ev["mispredict_late"]++;
      if (ev.mul)              n_ev["mul"]++;
      if (ev.load)             n_ev["load"]++;
      if (ev.store)            n_ev["store"]++;
      if (ev.ic_access)        begin run_icacc++; n_ev["ic_access"]++; end
      if (ev.ic_single_way)    begin run_icsingle++; n_ev["ic_single_way"]++; end
      check(!ev.ic_single_way || ev.ic_access, $sformatf("%s: single-way flag without a fetch", name));
      if (retire.valid) begin
        logic [31:0] rpc;
        rpc = ipc;
        run_retired++;
        iss_step(wen, rd, wd, st, sa, sd, brk);
        check(retire.pc == rpc, $sformatf("%s: retire pc %h, expected %h", name, retire.pc, rpc));
        check(retire.wen == wen && (!wen || (retire.rd == 5'(rd) && retire.wdata == wd)),
              $sformatf("%s: pc %h write r%0d=%h (%0d), expected r%0d=%h (%0d)", name, rpc,
                        retire.rd, retire.wdata, retire.wen, rd, wd, wen));
        check(retire.store == st && (!st || (retire.st_addr == sa && retire.st_data == sd)),
              $sformatf("%s: pc %h store mismatch", name, rpc));
        if (retire.late) late_pc.push_back(rpc);
        else if (is_alu_word(prog[rpc[13:2]])) early_pc.push_back(rpc);
      end
      if (halted) done = 1;
      if (cycle - t0 > 1000000) begin
        check(0, $sformatf("%s: did not halt", name));
        done = 1;
      end
    end
    run_cycles = cycle - t0;
    // the reference model must now stand on the BREAK
    check(prog[ipc[13:2]] == BRK, $sformatf("%s: halted at a different point (ref pc %h)", name, ipc));
    $display("%s: %0d instructions, %0d cycles, %0d AG stalls, %0d late-ALU ops",
             name, run_retired, run_cycles, run_stalls, late_pc.size());
  endtask

  // ------------------------------------------------------------ programs
  // loop of the dual-ALU example (labels: first body instruction is op1)
  task automatic prog_example(output int op_base);
    np = 0;
    for (int i = 0; i < DW; i++) dinit[i] = i * 7 + 3;
    emit(I(6'h09, 0, 29, 16'h0100));   // $29 = 0x100
    emit(I(6'h09, 0, 1, 4));           // $1 = 4
    emit(I(6'h09, 0, 2, 8));           // $2 = 8
    emit(I(6'h09, 0, 10, 64));         // $10 = 64
    emit(I(6'h09, 0, 8, 5));           // $8 = 5
    op_base = np * 4;
    emit(R(6'h21, 2, 1, 3));           // op1: addu $3,$2,$1        early
    emit(I(6'h23, 3, 5, 100));         // op2: lw   $5,100($3)
    emit(R(6'h23, 5, 10, 7));          // op3: subu $7,$5,$10       late
    emit(R(6'h07, 3, 7, 12));          // op4: srav $12,$7,$3       late
    emit(I(6'h05, 12, 8, 0));          // op5: bne  $12,$8,op6      late
    emit(I(6'h23, 29, 3, 100));        // op6: lw   $3,100($29)
    emit(R(6'h21, 3, 5, 8));           // op7: addu $8,$3,$5        late
    emit(I(6'h2B, 29, 8, 200));        // op8: sw   $8,200($29)
    emit(R(6'h03, 0, 10, 10, 1));      // op9: sra  $10,$10,1       early
    emit(I(6'h05, 10, 0, -10));        // op10: bne $10,$0,op1      early
    emit(BRK);
  endtask

  task automatic prog_timing(input int kind);
    // common prefix: independent setup
    np = 0;
    for (int i = 0; i < DW; i++) dinit[i] = 32'(i * 4);
    emit(I(6'h09, 0, 1, 40));
    emit(I(6'h09, 0, 2, 80));
    emit(I(6'h09, 0, 9, 3));
    for (int i = 0; i < 6; i++) emit(R(6'h21, 0, 0, 0));   // nop
    case (kind)
      0: begin  // baseline: load, dependent-free ALU, load
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 1, 2, 5));  emit(I(6'h23, 2, 6, 0));
      end
      1: begin  // load-use: the ALU operation goes late, no stall
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 4, 2, 5));  emit(I(6'h23, 2, 6, 0));
      end
      2: begin  // AG needs the late result at distance 1: 2 stall cycles
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 4, 2, 5));  emit(I(6'h23, 5, 6, 0));
      end
      3: begin  // AG needs the late result at distance 2: 1 stall cycle
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 4, 2, 5));  emit(R(6'h21, 1, 1, 7));
        emit(I(6'h23, 5, 6, 0));
      end
      4: begin  // distance 3: no stall
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 4, 2, 5));  emit(R(6'h21, 1, 1, 7));
        emit(R(6'h21, 1, 1, 8));   emit(I(6'h23, 5, 6, 0));
      end
      5: begin  // taken branch, first seen: resolved in the early ALU
        emit(I(6'h23, 0, 4, 16));  emit(I(6'h04, 1, 1, 1));  emit(I(6'h09, 0, 11, 1));
      end
      6: begin  // same, but the branch depends on the load: late ALU
        emit(I(6'h23, 0, 4, 16));  emit(I(6'h04, 4, 4, 1));  emit(I(6'h09, 0, 11, 1));
      end
      7: begin  // baseline for 3 (one more instruction)
        emit(I(6'h23, 0, 4, 16));  emit(R(6'h21, 1, 2, 5));  emit(R(6'h21, 1, 1, 7));
        emit(I(6'h23, 5, 6, 0));
      end
      default: begin  // multiply whose operand is a load at distance 1: 2 stalls
        emit(I(6'h23, 0, 4, 16));  emit(MULI(5, 4, 2));      emit(I(6'h23, 2, 6, 0));
      end
    endcase
    for (int i = 0; i < 4; i++) emit(R(6'h21, 1, 2, 13));
    emit(BRK);
  endtask

  // kernels modelled on two MiBench programs
  // CRC-32 (reflected polynomial EDB88320), one input bit at a time
  function automatic logic [31:0] crc32_bits(input logic [31:0] crc, input logic [7:0] b);
    crc = crc ^ {24'd0, b};
    for (int k = 0; k < 8; k++) crc = crc[0] ? ((crc >> 1) ^ 32'hEDB88320) : (crc >> 1);
    return crc;
  endfunction

  // table-driven CRC-32 over CRC_N bytes at 0x800, 256-word table at 0x400,
  // result stored at 0x1000
  localparam int CRC_N = 256;
  task automatic prog_crc32(output logic [31:0] golden);
    logic [7:0] b;
    np = 0;
    for (int i = 0; i < DW; i++) dinit[i] = 32'h0;
    for (int i = 0; i < 256; i++) dinit[256 + i] = crc32_bits(32'h0, 8'(i));
    golden = 32'hFFFF_FFFF;
    for (int j = 0; j < CRC_N; j++) begin
      b = 8'($urandom);
      dinit[512 + j / 4][8 * (j % 4) +: 8] = b;
      golden = crc32_bits(golden, b);
    end
    golden = ~golden;
    emit(I(6'h09, 0, 8, -1));               // crc = ~0
    emit(I(6'h09, 0, 4, 16'h0800));         // p
    emit(I(6'h09, 0, 5, 16'h0800 + CRC_N)); // end
    emit(I(6'h24, 4, 6, 0));                // loop: lbu  r6,0(r4)
    emit(R(6'h26, 8, 6, 7));                //       xor  r7,r8,r6
    emit(I(6'h0C, 7, 7, 255));              //       andi r7,r7,255
    emit(R(6'h00, 0, 7, 7, 2));             //       sll  r7,r7,2
    emit(I(6'h23, 7, 9, 16'h0400));         //       lw   r9,0x400(r7)
    emit(R(6'h02, 0, 8, 8, 8));             //       srl  r8,r8,8
    emit(R(6'h26, 8, 9, 8));                //       xor  r8,r8,r9
    emit(I(6'h09, 4, 4, 1));                //       addiu r4,r4,1
    emit(I(6'h05, 4, 5, -9));               //       bne  r4,r5,loop
    emit(R(6'h27, 8, 0, 8));                // nor  r8,r8,r0
    emit(I(6'h2B, 0, 8, 16'h1000));         // sw   r8,0x1000(r0)
    emit(BRK);
  endtask

  // bit count (clear the lowest set bit until zero) over BC_N words at 0x800,
  // total stored at 0x1004
  localparam int BC_N = 64;
  task automatic prog_bitcount(output int golden);
    logic [31:0] w;
    np = 0;
    golden = 0;
    for (int i = 0; i < DW; i++) dinit[i] = 32'h0;
    for (int j = 0; j < BC_N; j++) begin
      w = (j % 5 == 0) ? 32'h0 : ($urandom & $urandom);
      dinit[512 + j] = w;
      golden += $countones(w);
    end
    emit(I(6'h09, 0, 4, 16'h0800));         // p
    emit(I(6'h09, 0, 5, 16'h0800 + 4 * BC_N));
    emit(I(6'h09, 0, 10, 0));               // total
    emit(I(6'h23, 4, 6, 0));                // outer: lw   r6,0(r4)
    emit(I(6'h04, 6, 0, 4));                //        beq  r6,r0,next
    emit(I(6'h09, 10, 10, 1));              // inner: addiu r10,r10,1
    emit(I(6'h09, 6, 7, -1));               //        addiu r7,r6,-1
    emit(R(6'h24, 6, 7, 6));                //        and  r6,r6,r7
    emit(I(6'h05, 6, 0, -4));               //        bne  r6,r0,inner
    emit(I(6'h09, 4, 4, 4));                // next:  addiu r4,r4,4
    emit(I(6'h05, 4, 5, -8));               //        bne  r4,r5,outer
    emit(I(6'h2B, 0, 10, 16'h1004));        // sw   r10,0x1004(r0)
    emit(BRK);
  endtask

  // random program: register use r1..r15 data, r16 address, r17 call temp,
  // r18 zero loaded from memory, r20 loop counter, r29 base, r31 link
  function automatic int rreg();
    return 1 + ($urandom % 15);
  endfunction

  task automatic emit_rand_simple();
    int k;
    k = $urandom % 16;
    case (k)
      0, 1, 2: begin
        logic [5:0] fns [10] = '{6'h21, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B, 6'h04, 6'h07};
        emit(R(fns[$urandom % 10], rreg(), rreg(), rreg()));
      end
      3: emit(R(($urandom % 2) ? 6'h00 : 6'h03, 0, rreg(), rreg(), $urandom % 32));
      4, 5: begin
        logic [5:0] ops [6] = '{6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E};
        emit(I(ops[$urandom % 6], rreg(), rreg(), $urandom));
      end
      6, 7: emit(I(6'h23, 29, rreg(), 4 * ($urandom % 256)));
      8: begin
        logic [5:0] lops [4] = '{6'h20, 6'h21, 6'h24, 6'h25};
        logic [5:0] lo;
        lo = lops[$urandom % 4];
        emit(I(lo, 29, rreg(), (lo inside {6'h20, 6'h24}) ? $urandom % 1024 : 2 * ($urandom % 512)));
      end
      9: begin
        case ($urandom % 3)
          0: emit(I(6'h2B, 29, rreg(), 4 * ($urandom % 128)));
          1: emit(I(6'h28, 29, rreg(), $urandom % 512));
          default: emit(I(6'h29, 29, rreg(), 2 * ($urandom % 256)));
        endcase
      end
      10: emit(MULI(rreg(), rreg(), rreg()));
      11: emit(I(6'h0F, 0, rreg(), $urandom));
      default: emit(R(6'h21, rreg(), rreg(), rreg()));
    endcase
  endtask

  task automatic prog_random(input int blocks, input int iters);
    int loop_pc, call_fix, sub_pc, nskip;
    np = 0;
    for (int i = 0; i < DW; i++) dinit[i] = $urandom;
    dinit[200] = 0;
    emit(I(6'h09, 0, 29, 0));
    for (int r = 1; r <= 15; r++) begin
      emit(I(6'h0F, 0, r, $urandom));
      emit(I(6'h0D, r, r, $urandom));
    end
    emit(I(6'h09, 0, 20, iters));
    loop_pc = np;
    for (int b = 0; b < blocks; b++) begin
      case ($urandom % 6)
        0: begin  // computed base, 0..2 instructions in between, load or store
          int gap;
          gap = $urandom % 3;
          if ($urandom % 2) emit(I(6'h23, 29, rreg(), 4 * ($urandom % 256)));
          emit(I(6'h0C, rreg(), 16, 16'h01FC));
          for (int g = 0; g < gap; g++) emit_rand_simple();
          case ($urandom % 4)
            0: emit(I(6'h23, 16, rreg(), 0));
            1: emit(I(6'h24, 16, rreg(), $urandom % 4));
            2: emit(I(6'h28, 16, rreg(), $urandom % 4));
            default: emit(I(6'h2B, 16, rreg(), 0));
          endcase
        end
        1: begin  // forward branch over 1..3 instructions
          logic [5:0] bop;
          nskip = 1 + $urandom % 3;
          case ($urandom % 4)
            0: bop = 6'h04;
            1: bop = 6'h05;
            2: bop = 6'h06;
            default: bop = 6'h07;
          endcase
          if ($urandom % 2) emit(I(6'h23, 29, rreg(), 4 * ($urandom % 256)));
          emit(I(bop, rreg(), (bop inside {6'h04, 6'h05}) ? rreg() : 0, nskip));
          for (int s = 0; s < nskip; s++) emit_rand_simple();
        end
        2: begin  // call the subroutine (patched below)
          call_fix = np;
          emit(32'hFFFF_FFFF);
          prog[call_fix] = {6'h03, 26'h0};   // placeholder, patched later
          prog[call_fix][0] = 1'b1;          // mark
        end
        default: begin
          repeat (1 + $urandom % 4) emit_rand_simple();
        end
      endcase
    end
    emit(I(6'h09, 20, 20, -1));
    emit(I(6'h07, 20, 0, loop_pc - np - 1));
    emit(BRK);
    // subroutine: loaded zero added to the link register makes the return late
    sub_pc = np;
    repeat (2) emit_rand_simple();
    emit(I(6'h23, 29, 18, 800));
    emit(R(6'h21, 31, 18, 31));
    emit(R(6'h08, 31, 0, 0));
    for (int i = 0; i < sub_pc; i++)
      if (prog[i] == {6'h03, 25'h0, 1'b1}) prog[i] = JI(6'h03, sub_pc);
    // a store must not hit the zero word: stores go to words 0..127 only
  endtask

  // ------------------------------------------------------------ main
  initial begin
    int op_base, c_base, c_t;
    int cyc [9];
    int stl [9];
    rst_n = 1'b0;
    imem_ld_we = 0; dmem_ld_we = 0;
    imem_ld_addr = 0; dmem_ld_addr = 0; imem_ld_data = 0; dmem_ld_data = 0;

    // 1. the dual-ALU example loop
    prog_example(op_base);
    run_program("example");
    check(run_stalls == 0, "example: no issue stalls expected");
    // op9 in the early ALU while op7 is in the late ALU, once per iteration
    check(run_both == 7, $sformatf("example: both ALUs busy in %0d cycles, expected 7", run_both));
    begin
      int exp_late [4] = '{2, 3, 4, 6};    // op3, op4, op5, op7 (0-based op index)
      int exp_early [3] = '{0, 8, 9};       // op1, op9, op10
      int nl, ne;
      nl = 0; ne = 0;
      foreach (late_pc[i]) begin
        int k;
        k = (late_pc[i] - op_base) / 4;
        check(k inside {2, 3, 4, 6}, $sformatf("example: op%0d should not run late", k + 1));
        nl++;
      end
      foreach (early_pc[i]) begin
        int k;
        k = (int'(early_pc[i]) - op_base) / 4;
        if (early_pc[i] >= op_base)
          check(k inside {0, 8, 9}, $sformatf("example: op%0d should not run early", k + 1));
        else ne--;
        ne++;
      end
      check(nl == 4 * 7, $sformatf("example: %0d late ops, expected 28", nl));
      check(ne == 3 * 7, $sformatf("example: %0d early ops in the loop, expected 21", ne));
    end

    // 2. timing
    for (int k = 0; k < 9; k++) begin
      prog_timing(k);
      run_program($sformatf("timing%0d", k));
      cyc[k] = run_cycles;
      stl[k] = run_stalls;
      // straight-line code from PC 0 to the BREAK at PC 64: only the first
      // fetch of each of the 3 lines is a conventional access
      if (k == 0)
        check(run_icacc inside {17, 18} && run_icacc - run_icsingle == 3,
              $sformatf("timing0: %0d fetches, %0d single-way, expected 3 conventional",
                        run_icacc, run_icsingle));
    end
    check(cyc[1] == cyc[0] && stl[1] == 0, "load-use through the late ALU must cost no cycle");
    check(cyc[2] == cyc[0] + 2 && stl[2] == 2, $sformatf("AG at distance 1: %0d extra cycles", cyc[2] - cyc[0]));
    check(cyc[3] == cyc[7] + 1 && stl[3] == 1, $sformatf("AG at distance 2: %0d extra cycles", cyc[3] - cyc[7]));
    check(stl[4] == 0, "AG at distance 3 must not stall");
    check(cyc[6] == cyc[5] + 2, $sformatf("late misprediction costs %0d more cycles than early, expected 2", cyc[6] - cyc[5]));
    check(cyc[5] == cyc[0] - 1 + 3, $sformatf("early misprediction: %0d cycles vs %0d", cyc[5], cyc[0]));
    check(cyc[8] == cyc[0] + 2 && stl[8] == 2, "multiply on a load at distance 1: 2 stalls");

    // 3. random programs
    for (int s = 0; s < 40; s++) begin
      prog_random(30 + $urandom % 30, 3 + $urandom % 5);
      run_program($sformatf("random%0d", s));
    end

    // 4. kernels: results against golden values computed here
    begin
      logic [31:0] gcrc;
      int          gbits;
      check(crc32_bits(crc32_bits(32'hFFFF_FFFF, 8'h61), 8'h62) == ~32'h9E83486D, "CRC-32 model");
      prog_crc32(gcrc);
      run_program("crc32");
      check(dm[1024] == gcrc, $sformatf("crc32: %h, expected %h", dm[1024], gcrc));
      // per byte: xor, andi, sll (chain after the lbu) and the xor after the
      // table load go late; the table load waits 2 cycles for the late sll
      check(late_pc.size() == 4 * CRC_N && run_stalls == 2 * CRC_N,
            $sformatf("crc32: %0d late ops, %0d AG stalls", late_pc.size(), run_stalls));
      $display("crc32: CPI %0.3f, %0d of the ALU operations in the late ALU",
               real'(run_cycles) / real'(run_retired), late_pc.size());
      prog_bitcount(gbits);
      run_program("bitcount");
      check(dm[1025] == 32'(gbits), $sformatf("bitcount: %0d, expected %0d", dm[1025], gbits));
      // only the beq right after each lw goes late; nothing stalls
      check(late_pc.size() == BC_N && run_stalls == 0,
            $sformatf("bitcount: %0d late ops, %0d AG stalls", late_pc.size(), run_stalls));
      $display("bitcount: CPI %0.3f, %0d of the ALU operations in the late ALU",
               real'(run_cycles) / real'(run_retired), late_pc.size());
    end

    // every mechanism must have happened
    foreach (n_ev[k]) $display("  event %-18s %0d", k, n_ev[k]);
    check(n_ev["early_alu"] > 0, "early ALU never used");
    check(n_ev["late_alu"] > 0, "late ALU never used");
    check(n_ev["both_alus"] > 0, "both ALUs never busy together");
    check(n_ev["ag_stall"] > 0, "no AG stall");
    check(n_ev["mispredict_early"] > 0, "no early misprediction");
    check(n_ev["mispredict_late"] > 0, "no late misprediction");
    check(n_ev["mul"] > 0, "no multiply");
    check(n_ev["load"] > 0, "no load");
    check(n_ev["store"] > 0, "no store");
    check(n_ev["ic_single_way"] > 0, "no single-way fetch");
    check(n_ev["ic_single_way"] < n_ev["ic_access"], "no conventional fetch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
