// mips_pkg: shared encodings and pipeline-register types of the MIPS2000
// five-stage pipeline.
//
// Opcodes, function codes and REGIMM rt codes are the MIPS R2000 ones (the
// R-type opcode is 0x00 with the operation in the 6-bit function field). The
// ALU, shifter and selector encodings are this design's own. The structs
// describe what each pipeline register carries: the whole instruction word
// (so every later stage can decode it) plus the data produced so far.
package mips_pkg;

  // ---------------- opcodes (instr[31:26]) ----------------
  localparam logic [5:0] OP_SPECIAL = 6'h00, OP_REGIMM = 6'h01, OP_J     = 6'h02,
                         OP_JAL     = 6'h03, OP_BEQ    = 6'h04, OP_BNE   = 6'h05,
                         OP_BLEZ    = 6'h06, OP_BGTZ   = 6'h07, OP_ADDI  = 6'h08,
                         OP_ADDIU   = 6'h09, OP_SLTI   = 6'h0A, OP_SLTIU = 6'h0B,
                         OP_ANDI    = 6'h0C, OP_ORI    = 6'h0D, OP_XORI  = 6'h0E,
                         OP_LUI     = 6'h0F, OP_LB     = 6'h20, OP_LH    = 6'h21,
                         OP_LWL     = 6'h22, OP_LW     = 6'h23, OP_LBU   = 6'h24,
                         OP_LHU     = 6'h25, OP_LWR    = 6'h26, OP_SB    = 6'h28,
                         OP_SH      = 6'h29, OP_SWL    = 6'h2A, OP_SW    = 6'h2B,
                         OP_SWR     = 6'h2E;

  // ---------------- function codes (instr[5:0], opcode 0) ----------------
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
                         FN_JR   = 6'h08, FN_JALR = 6'h09, FN_ADD  = 6'h20,
                         FN_ADDU = 6'h21, FN_SUB  = 6'h22, FN_SUBU = 6'h23,
                         FN_AND  = 6'h24, FN_OR   = 6'h25, FN_XOR  = 6'h26,
                         FN_NOR  = 6'h27, FN_SLT  = 6'h2A, FN_SLTU = 6'h2B;

  // ---------------- REGIMM rt codes (instr[20:16], opcode 1) ----------------
  localparam logic [4:0] RT_BLTZ = 5'h00, RT_BGEZ = 5'h01, RT_BLTZAL = 5'h10, RT_BGEZAL = 5'h11;

  localparam logic [31:0] NOP = 32'h0000_0000;  // sll r0,r0,0
  localparam logic [4:0]  RA  = 5'd31;          // return-address register

  // ---------------- ALU 32 Turbo operations ----------------
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU, ALU_LUI,
    ALU_BEQ, ALU_BNE, ALU_BLEZ, ALU_BGTZ, ALU_BLTZ, ALU_BGEZ
  } alu_op_e;

  // Execution Stage Controller outputs
  typedef struct packed {
    alu_op_e    alu_op;
    logic       b_imm;       // ALU B side: 1 = extended immediate, 0 = register B
    logic       sh_var;      // shift amount: 1 = A[4:0] (sllv...), 0 = shamt field
    logic       sh_left;     // shift direction
    logic       sh_arith;    // arithmetic right shift
    logic       use_shift;   // result: 1 = barrel shifter, 0 = ALU
  } ex_ctrl_t;

  // Next-PC sources (Next PC Source Selector inputs)
  typedef enum logic [1:0] { NPC_PC4 = 2'd0, NPC_JUMP = 2'd1, NPC_BRANCH = 2'd2, NPC_REG = 2'd3 } npc_sel_e;

  // Write-back selectors
  typedef enum logic [1:0] { CD_ALU = 2'd0, CD_MEM = 2'd1, CD_PC4 = 2'd2 } cdata_sel_e;
  typedef enum logic [1:0] { CA_RD = 2'd0, CA_RT = 2'd1, CA_RA = 2'd2 } caddr_sel_e;

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc_plus4;
  } if_id_t;

  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc_plus4;
    logic [31:0] a;          // register A (rs)
    logic [31:0] b;          // register B (rt)
    logic [31:0] imm;        // extended immediate
  } id_ex_t;

  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc_plus4;
    logic [31:0] alu;        // ALU or shifter result / effective address
    logic [31:0] a;          // forwarded A (jr target)
    logic [31:0] b;          // forwarded B (store data, lwl/lwr merge)
    logic        cond;       // branch condition true
    logic [31:0] branch;     // branch target address
  } ex_mem_t;

  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc_plus4;
    logic [31:0] alu;
    logic [31:0] lmd;        // load data from MEM_Reader
  } mem_wb_t;

  function automatic logic [5:0] f_opcode(input logic [31:0] i); return i[31:26]; endfunction
  function automatic logic [4:0] f_rs    (input logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0] f_rt    (input logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0] f_rd    (input logic [31:0] i); return i[15:11]; endfunction
  function automatic logic [4:0] f_shamt (input logic [31:0] i); return i[10:6];  endfunction
  function automatic logic [5:0] f_funct (input logic [31:0] i); return i[5:0];   endfunction

  function automatic logic is_load(input logic [5:0] op);
    return op inside {OP_LB, OP_LH, OP_LWL, OP_LW, OP_LBU, OP_LHU, OP_LWR};
  endfunction

endpackage
