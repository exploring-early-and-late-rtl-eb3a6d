// dcpu_pkg: types and constants shared by the dual-ALU in-order pipeline.
//
// The pipeline executes a MIPS-like 32-bit integer instruction set (a MIPS I
// subset plus the MIPS32 three-operand MUL). This package holds the instruction
// field encodings, the ALU operation and branch-condition enumerations, the
// decoded-control structure that travels down the pipeline, and the structure
// of per-cycle event pulses the pipeline exports. The encodings are the
// standard MIPS ones; which instructions are included is this design's choice.
package dcpu_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREGS = 32;

  // Primary opcodes (instr[31:26])
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_REGIMM   = 6'h01;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_JAL      = 6'h03;
  localparam logic [5:0] OP_BEQ      = 6'h04;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_BLEZ     = 6'h06;
  localparam logic [5:0] OP_BGTZ     = 6'h07;
  localparam logic [5:0] OP_ADDI     = 6'h08;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SLTI     = 6'h0A;
  localparam logic [5:0] OP_SLTIU    = 6'h0B;
  localparam logic [5:0] OP_ANDI     = 6'h0C;
  localparam logic [5:0] OP_ORI      = 6'h0D;
  localparam logic [5:0] OP_XORI     = 6'h0E;
  localparam logic [5:0] OP_LUI      = 6'h0F;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1C;
  localparam logic [5:0] OP_LB       = 6'h20;
  localparam logic [5:0] OP_LH       = 6'h21;
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_LBU      = 6'h24;
  localparam logic [5:0] OP_LHU      = 6'h25;
  localparam logic [5:0] OP_SB       = 6'h28;
  localparam logic [5:0] OP_SH       = 6'h29;
  localparam logic [5:0] OP_SW       = 6'h2B;

  // SPECIAL function codes (instr[5:0])
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_SRAV  = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_BREAK = 6'h0D;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;
  // SPECIAL2 function code of MUL rd, rs, rt
  localparam logic [5:0] FN2_MUL  = 6'h02;
  // REGIMM rt codes
  localparam logic [4:0] RI_BLTZ  = 5'h00;
  localparam logic [4:0] RI_BGEZ  = 5'h01;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // Control-transfer kind, evaluated by whichever ALU executes the instruction
  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_e;

  // Size of a memory access
  typedef enum logic [1:0] { MS_BYTE, MS_HALF, MS_WORD } msize_e;

  // Decoded control of one instruction
  typedef struct packed {
    alu_op_e     alu_op;
    logic        b_imm;     // ALU operand B is the immediate
    logic        a_shamt;   // ALU operand A is the shift amount field
    logic [31:0] imm;       // extended immediate
    logic [4:0]  shamt;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;        // destination register (0: none)
    logic        use_rs;    // reads rs
    logic        use_rt;    // reads rt
    logic        wen;       // writes rd
    logic        is_alu;    // executes in an ALU (may be steered early or late)
    logic        is_load;
    logic        is_store;
    logic        is_mul;
    msize_e      msize;     // load/store access size
    logic        ld_uns;    // zero-extending load (LBU, LHU)
    logic        is_link;   // result is the return address PC+4
    br_e         br;
    logic [31:0] target;    // PC-relative or absolute jump target
    logic        is_break;  // BREAK: stops fetch; the pipeline halts once drained
    logic        illegal;
  } ctrl_t;

  // One-cycle pulses describing what the pipeline did this cycle
  typedef struct packed {
    logic retire;          // an instruction left WB
    logic early_alu;       // an ALU operation executed in the early ALU (EXE)
    logic late_alu;        // an ALU operation executed in the late ALU (DC-2)
    logic both_alus;       // early and late ALU busy in the same cycle
    logic ag_stall;        // issue held: AG or multiplier operand not ready
    logic mispredict_early;// misprediction resolved in EXE
    logic mispredict_late; // misprediction resolved in DC-2
    logic mul;             // a multiplication entered mult-1
    logic load;            // a load entered DC-2
    logic store;           // a store wrote memory
    logic ic_access;       // instruction array accessed for a valid fetch
    logic ic_single_way;   // ... and the access was sequential in the same line
  } perf_ev_t;

  // Architectural effect of one retiring instruction
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic        wen;      // register write
    logic [4:0]  rd;
    logic [31:0] wdata;
    logic        store;    // memory write (done in DC-2)
    logic [31:0] st_addr;
    logic [31:0] st_data;
    logic        late;     // executed in the late ALU
  } retire_t;

endpackage
