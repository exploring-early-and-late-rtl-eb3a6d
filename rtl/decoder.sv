// decoder: instruction decoder of the ID stage (the "Ctrl" part of ID).
//
// Turns a 32-bit MIPS-format instruction and its PC into the ctrl_t record that
// travels down the pipeline: ALU operation and operand selection, extended
// immediate, source and destination registers, instruction class (ALU, load,
// store, multiply, control transfer) and the PC-relative or absolute target of
// a branch or jump. Combinational.
//
// Supported: ADD(U) SUB(U) AND OR XOR NOR SLT(U) SLL SRL SRA SLLV SRLV SRAV,
// ADDI(U) SLTI(U) ANDI ORI XORI LUI, LB LBU LH LHU LW SB SH SW, MUL (MIPS32), BEQ BNE BLEZ BGTZ
// BLTZ BGEZ, J JAL JR JALR, BREAK. The subset, the absence of branch delay
// slots and of overflow traps (ADD/ADDI behave as ADDU/ADDIU) are choices of
// this design. An unknown encoding is flagged illegal and executes as a no-op.
module decoder
  import dcpu_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  output ctrl_t       c
);
  logic [5:0]  opc, fn;
  logic [4:0]  rs, rt, rd;
  logic [31:0] simm, zimm, pc4;

  always_comb begin
    opc  = instr[31:26];
    rs   = instr[25:21];
    rt   = instr[20:16];
    rd   = instr[15:11];
    fn   = instr[5:0];
    simm = {{16{instr[15]}}, instr[15:0]};
    zimm = {16'd0, instr[15:0]};
    pc4  = pc + 32'd4;

    c          = '0;
    c.alu_op   = ALU_ADD;
    c.br       = BR_NONE;
    c.msize    = MS_WORD;
    c.rs       = rs;
    c.rt       = rt;
    c.shamt    = instr[10:6];
    c.imm      = simm;
    c.target   = pc4 + {simm[29:0], 2'b00};

    unique case (opc)
      OP_SPECIAL: begin
        c.rd     = rd;
        c.is_alu = 1'b1;
        c.use_rs = 1'b1;
        c.use_rt = 1'b1;
        c.wen    = 1'b1;
        unique case (fn)
          FN_ADD, FN_ADDU: c.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: c.alu_op = ALU_SUB;
          FN_AND:  c.alu_op = ALU_AND;
          FN_OR:   c.alu_op = ALU_OR;
          FN_XOR:  c.alu_op = ALU_XOR;
          FN_NOR:  c.alu_op = ALU_NOR;
          FN_SLT:  c.alu_op = ALU_SLT;
          FN_SLTU: c.alu_op = ALU_SLTU;
          FN_SLL:  begin c.alu_op = ALU_SLL; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          FN_SRL:  begin c.alu_op = ALU_SRL; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          FN_SRA:  begin c.alu_op = ALU_SRA; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          FN_SLLV: c.alu_op = ALU_SLL;
          FN_SRLV: c.alu_op = ALU_SRL;
          FN_SRAV: c.alu_op = ALU_SRA;
          FN_JR:   begin c.br = BR_JR; c.use_rt = 1'b0; c.wen = 1'b0; end
          FN_JALR: begin c.br = BR_JR; c.use_rt = 1'b0; c.is_link = 1'b1; end
          FN_BREAK: begin
            c.is_break = 1'b1; c.is_alu = 1'b0; c.wen = 1'b0;
            c.use_rs = 1'b0; c.use_rt = 1'b0;
          end
          default: begin
            c.illegal = 1'b1; c.is_alu = 1'b0; c.wen = 1'b0;
            c.use_rs = 1'b0; c.use_rt = 1'b0;
          end
        endcase
      end
      OP_SPECIAL2: begin
        if (fn == FN2_MUL) begin
          c.rd = rd; c.wen = 1'b1; c.is_mul = 1'b1;
          c.use_rs = 1'b1; c.use_rt = 1'b1;
        end else begin
          c.illegal = 1'b1;
        end
      end
      OP_REGIMM: begin
        c.is_alu = 1'b1; c.use_rs = 1'b1;
        unique case (rt)
          RI_BLTZ: c.br = BR_LTZ;
          RI_BGEZ: c.br = BR_GEZ;
          default: begin c.illegal = 1'b1; c.is_alu = 1'b0; c.use_rs = 1'b0; end
        endcase
      end
      OP_J, OP_JAL: begin
        c.is_alu = 1'b1;
        c.br     = BR_J;
        c.target = {pc4[31:28], instr[25:0], 2'b00};
        if (opc == OP_JAL) begin
          c.rd = 5'd31; c.wen = 1'b1; c.is_link = 1'b1;
        end
      end
      OP_BEQ:  begin c.is_alu = 1'b1; c.br = BR_EQ;  c.use_rs = 1'b1; c.use_rt = 1'b1; end
      OP_BNE:  begin c.is_alu = 1'b1; c.br = BR_NE;  c.use_rs = 1'b1; c.use_rt = 1'b1; end
      OP_BLEZ: begin c.is_alu = 1'b1; c.br = BR_LEZ; c.use_rs = 1'b1; end
      OP_BGTZ: begin c.is_alu = 1'b1; c.br = BR_GTZ; c.use_rs = 1'b1; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        c.is_alu = 1'b1; c.b_imm = 1'b1; c.rd = rt; c.wen = 1'b1;
        c.use_rs = (opc != OP_LUI);
        unique case (opc)
          OP_SLTI:  c.alu_op = ALU_SLT;
          OP_SLTIU: c.alu_op = ALU_SLTU;
          OP_ANDI:  begin c.alu_op = ALU_AND; c.imm = zimm; end
          OP_ORI:   begin c.alu_op = ALU_OR;  c.imm = zimm; end
          OP_XORI:  begin c.alu_op = ALU_XOR; c.imm = zimm; end
          OP_LUI:   begin c.alu_op = ALU_LUI; c.imm = zimm; end
          default:  c.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        c.is_load = 1'b1; c.use_rs = 1'b1; c.rd = rt; c.wen = 1'b1;
        c.msize   = (opc inside {OP_LB, OP_LBU}) ? MS_BYTE :
                    (opc inside {OP_LH, OP_LHU}) ? MS_HALF : MS_WORD;
        c.ld_uns  = opc inside {OP_LBU, OP_LHU};
      end
      OP_SB, OP_SH, OP_SW: begin
        c.is_store = 1'b1; c.use_rs = 1'b1; c.use_rt = 1'b1;
        c.msize    = (opc == OP_SB) ? MS_BYTE : (opc == OP_SH) ? MS_HALF : MS_WORD;
      end
      default: c.illegal = 1'b1;
    endcase

    if (c.rd == 5'd0) c.wen = 1'b0;
  end
endmodule
