// tb_decoder: self-checking test of the instruction decoder. Hand-encoded
// instructions of every class are decoded and the fields that matter for the
// pipeline (ALU operation, operand selects, immediate, registers, class flags,
// branch kind and target) are compared with the values expected from the
// MIPS encoding. Random immediate instructions, loads/stores and branches
// then check immediate extension, registers and branch targets.
module tb_decoder;
  import dcpu_pkg::*;
  logic [31:0] instr, pc;
  ctrl_t c;
  int checks = 0, failures = 0;

  decoder dut (.instr, .pc, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask

  task automatic dec(logic [31:0] w, logic [31:0] p = 32'h0000_1000);
    instr = w; pc = p; #1;
  endtask

  initial begin
    // addu $3,$2,$1
    dec({6'h00, 5'd2, 5'd1, 5'd3, 5'd0, 6'h21});
    chk(c.alu_op == ALU_ADD && c.rd == 3 && c.wen && c.use_rs && c.use_rt && c.is_alu && !c.b_imm, "addu");
    // subu $7,$5,$10
    dec({6'h00, 5'd5, 5'd10, 5'd7, 5'd0, 6'h23});
    chk(c.alu_op == ALU_SUB && c.rs == 5 && c.rt == 10 && c.rd == 7, "subu");
    // sra $10,$10,1
    dec({6'h00, 5'd0, 5'd10, 5'd10, 5'd1, 6'h03});
    chk(c.alu_op == ALU_SRA && c.a_shamt && c.shamt == 1 && !c.use_rs && c.use_rt && c.rd == 10, "sra");
    // srav $12,$7,$3
    dec({6'h00, 5'd3, 5'd7, 5'd12, 5'd0, 6'h07});
    chk(c.alu_op == ALU_SRA && !c.a_shamt && c.use_rs && c.use_rt && c.rd == 12, "srav");
    // addiu $4,$5,-2
    dec({6'h09, 5'd5, 5'd4, 16'hFFFE});
    chk(c.alu_op == ALU_ADD && c.b_imm && c.imm == 32'hFFFF_FFFE && c.rd == 4 && c.use_rs && !c.use_rt, "addiu");
    // andi $4,$5,0x8001 (zero-extended)
    dec({6'h0C, 5'd5, 5'd4, 16'h8001});
    chk(c.alu_op == ALU_AND && c.imm == 32'h0000_8001, "andi");
    // lui $6,0x1234
    dec({6'h0F, 5'd0, 5'd6, 16'h1234});
    chk(c.alu_op == ALU_LUI && !c.use_rs && c.rd == 6 && c.imm == 32'h1234, "lui");
    // sltiu
    dec({6'h0B, 5'd1, 5'd2, 16'h8000});
    chk(c.alu_op == ALU_SLTU && c.imm == 32'hFFFF_8000, "sltiu");
    // lw $5,100($3)
    dec({6'h23, 5'd3, 5'd5, 16'd100});
    chk(c.is_load && !c.is_alu && c.rd == 5 && c.wen && c.use_rs && !c.use_rt && c.imm == 100, "lw");
    // sw $8,-4($29)
    dec({6'h2B, 5'd29, 5'd8, 16'hFFFC});
    chk(c.is_store && !c.wen && c.use_rs && c.use_rt && c.imm == 32'hFFFF_FFFC, "sw");
    // lb / lbu / lh / lhu / sb / sh
    dec({6'h20, 5'd3, 5'd5, 16'd1});
    chk(c.is_load && c.msize == MS_BYTE && !c.ld_uns && c.rd == 5 && c.wen, "lb");
    dec({6'h24, 5'd3, 5'd5, 16'd1});
    chk(c.is_load && c.msize == MS_BYTE && c.ld_uns, "lbu");
    dec({6'h21, 5'd3, 5'd5, 16'd2});
    chk(c.is_load && c.msize == MS_HALF && !c.ld_uns, "lh");
    dec({6'h25, 5'd3, 5'd5, 16'd2});
    chk(c.is_load && c.msize == MS_HALF && c.ld_uns, "lhu");
    dec({6'h23, 5'd3, 5'd5, 16'd4});
    chk(c.is_load && c.msize == MS_WORD, "lw size");
    dec({6'h28, 5'd3, 5'd5, 16'd1});
    chk(c.is_store && c.msize == MS_BYTE && !c.wen && c.use_rt, "sb");
    dec({6'h29, 5'd3, 5'd5, 16'd2});
    chk(c.is_store && c.msize == MS_HALF, "sh");
    // mul $9,$1,$2
    dec({6'h1C, 5'd1, 5'd2, 5'd9, 5'd0, 6'h02});
    chk(c.is_mul && !c.is_alu && c.rd == 9 && c.wen && c.use_rs && c.use_rt, "mul");
    // bne $12,$8,-3 at 0x1000 -> 0x1000+4-12
    dec({6'h05, 5'd12, 5'd8, 16'hFFFD});
    chk(c.br == BR_NE && c.is_alu && !c.wen && c.target == 32'h0000_0FF8, "bne");
    // beq +5
    dec({6'h04, 5'd1, 5'd2, 16'd5});
    chk(c.br == BR_EQ && c.target == 32'h0000_1018, "beq");
    dec({6'h06, 5'd1, 5'd0, 16'd1});  chk(c.br == BR_LEZ && c.use_rs && !c.use_rt, "blez");
    dec({6'h07, 5'd1, 5'd0, 16'd1});  chk(c.br == BR_GTZ, "bgtz");
    dec({6'h01, 5'd1, 5'd0, 16'd1});  chk(c.br == BR_LTZ && c.use_rs, "bltz");
    dec({6'h01, 5'd1, 5'd1, 16'd1});  chk(c.br == BR_GEZ, "bgez");
    // j / jal
    dec({6'h02, 26'h0000_040}, 32'h1000_0000);
    chk(c.br == BR_J && !c.wen && c.target == 32'h1000_0100, "j");
    dec({6'h03, 26'h0000_040}, 32'h1000_0000);
    chk(c.br == BR_J && c.wen && c.rd == 31 && c.is_link, "jal");
    // jr $31, jalr $5,$6
    dec({6'h00, 5'd31, 5'd0, 5'd0, 5'd0, 6'h08});
    chk(c.br == BR_JR && !c.wen && c.use_rs && !c.use_rt, "jr");
    dec({6'h00, 5'd6, 5'd0, 5'd5, 5'd0, 6'h09});
    chk(c.br == BR_JR && c.wen && c.rd == 5 && c.is_link, "jalr");
    // break, nop (write to $0 suppressed), illegal
    dec(32'h0000_000D);
    chk(c.is_break && !c.wen && !c.is_alu, "break");
    dec(32'h0000_0000);
    chk(!c.wen && !c.illegal, "nop");
    dec({6'h3F, 26'h0});
    chk(c.illegal && !c.wen && !c.is_load && !c.is_store, "illegal");
    // random R-type with rd 0 never writes
    repeat (200) begin
      dec({6'h00, 5'($urandom), 5'($urandom), 5'd0, 5'($urandom), 6'h21});
      chk(!c.wen, "rd0");
    end
    // random immediate forms: operation, extension of the immediate, registers
    repeat (400) begin
      logic [5:0]  op;
      logic [4:0]  rs, rt;
      logic [15:0] im;
      logic [31:0] sx, zx;
      alu_op_e     eop;
      bit          zext;
      case ($urandom % 8)
        0: begin op = 6'h08; eop = ALU_ADD;  zext = 0; end
        1: begin op = 6'h09; eop = ALU_ADD;  zext = 0; end
        2: begin op = 6'h0A; eop = ALU_SLT;  zext = 0; end
        3: begin op = 6'h0B; eop = ALU_SLTU; zext = 0; end
        4: begin op = 6'h0C; eop = ALU_AND;  zext = 1; end
        5: begin op = 6'h0D; eop = ALU_OR;   zext = 1; end
        6: begin op = 6'h0E; eop = ALU_XOR;  zext = 1; end
        default: begin op = 6'h0F; eop = ALU_LUI; zext = 1; end
      endcase
      rs = 5'($urandom); rt = 5'($urandom); im = 16'($urandom);
      sx = {{16{im[15]}}, im};
      zx = {16'd0, im};
      dec({op, rs, rt, im});
      chk(c.alu_op == eop && c.b_imm && c.is_alu && c.imm == (zext ? zx : sx) &&
          c.rd == rt && c.wen == (rt != 0) && !c.use_rt && c.use_rs == (op != 6'h0F) &&
          c.br == BR_NONE, $sformatf("immediate op %h", op));
    end
    // random loads/stores: sign-extended offset, base in rs
    repeat (200) begin
      logic [5:0]  op;
      logic [15:0] im;
      op = (($urandom % 2) == 0) ? 6'h23 : 6'h2B;
      im = 16'($urandom);
      dec({op, 5'($urandom), 5'd7, im});
      chk(c.imm == {{16{im[15]}}, im} && c.use_rs && (op == 6'h23 ? c.is_load : c.is_store),
          "load/store offset");
    end
    // random conditional branches: target = pc + 4 + 4 * sign-extended offset
    repeat (200) begin
      logic [15:0] im;
      logic [31:0] p;
      im = 16'($urandom);
      p  = {$urandom} & 32'hFFFF_FFFC;
      dec({6'h04, 5'd1, 5'd2, im}, p);
      chk(c.br == BR_EQ && c.target == p + 32'd4 + {{14{im[15]}}, im, 2'b00}, "branch target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
