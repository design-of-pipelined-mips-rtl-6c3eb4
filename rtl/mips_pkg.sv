// mips_pkg: types and constants shared by the pipelined MIPS core, its
// decoders and its caches. It holds the 4-bit ALU select codes, the MIPS
// opcode and funct numbers of the supported instruction subset, and the
// control bundles that the main control and the R-type control hand to
// the datapath. The opcode/funct numbers are the standard MIPS-I ones; the
// ALU select codes and the control encodings are this design's choice.
package mips_pkg;

  // ALU select (4 bits, as in the 64-bit ALU block diagram)
  typedef enum logic [3:0] {
    ALU_AND  = 4'h0, ALU_OR   = 4'h1, ALU_ADD  = 4'h2, ALU_XOR  = 4'h3,
    ALU_NOR  = 4'h4, ALU_SLL  = 4'h5, ALU_SUB  = 4'h6, ALU_SLT  = 4'h7,
    ALU_SLTU = 4'h8, ALU_SRL  = 4'h9, ALU_SRA  = 4'hA, ALU_PASSB = 4'hB
  } alu_op_t;

  // Operation class passed from main control to R-type control
  typedef enum logic [2:0] {
    AOP_ADD = 3'd0, AOP_RTYPE = 3'd1, AOP_SLT = 3'd2, AOP_SLTU = 3'd3,
    AOP_AND = 3'd4, AOP_OR = 3'd5, AOP_XOR = 3'd6
  } aluop_t;

  // Opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQ   = 6'h04, OP_BNE  = 6'h05, OP_ADDI = 6'h08,
                         OP_ADDIU = 6'h09, OP_SLTI = 6'h0A, OP_SLTIU= 6'h0B,
                         OP_ANDI  = 6'h0C, OP_ORI  = 6'h0D, OP_XORI = 6'h0E,
                         OP_LUI   = 6'h0F, OP_LB   = 6'h20, OP_LH   = 6'h21,
                         OP_LW    = 6'h23, OP_LBU  = 6'h24, OP_LHU  = 6'h25,
                         OP_SB    = 6'h28, OP_SH   = 6'h29, OP_SW   = 6'h2B;
  // R-type funct codes
  localparam logic [5:0] F_SLL  = 6'h00, F_SRL  = 6'h02, F_SRA  = 6'h03,
                         F_SLLV = 6'h04, F_SRLV = 6'h06, F_SRAV = 6'h07,
                         F_JR   = 6'h08, F_JALR = 6'h09, F_MFHI = 6'h10,
                         F_MTHI = 6'h11, F_MFLO = 6'h12, F_MTLO = 6'h13,
                         F_MULT = 6'h18, F_MULTU= 6'h19, F_DIV  = 6'h1A,
                         F_DIVU = 6'h1B, F_ADD  = 6'h20, F_ADDU = 6'h21,
                         F_SUB  = 6'h22, F_SUBU = 6'h23, F_AND  = 6'h24,
                         F_OR   = 6'h25, F_XOR  = 6'h26, F_NOR  = 6'h27,
                         F_SLT  = 6'h2A, F_SLTU = 6'h2B;

  // Immediate extension modes
  typedef enum logic [1:0] { EXT_SIGN = 2'd0, EXT_ZERO = 2'd1, EXT_UPPER = 2'd2 } ext_t;
  // Destination register select
  typedef enum logic [1:0] { DST_RT = 2'd0, DST_RD = 2'd1, DST_RA = 2'd2 } regdst_t;
  // Result source in W
  typedef enum logic [1:0] { RES_ALU = 2'd0, RES_MEM = 2'd1, RES_PC4 = 2'd2 } memtoreg_t;
  // Memory access size
  typedef enum logic [1:0] { SZ_WORD = 2'd0, SZ_HALF = 2'd1, SZ_BYTE = 2'd2 } memsize_t;
  // Multiply/divide operations
  typedef enum logic [1:0] { MD_MULT = 2'd0, MD_MULTU = 2'd1, MD_DIV = 2'd2, MD_DIVU = 2'd3 } mdop_t;

  // Main control output
  typedef struct packed {
    logic      regwrite;
    memtoreg_t memtoreg;
    logic      memread;
    logic      memwrite;
    memsize_t  memsize;
    logic      memunsigned;
    logic      branch;
    logic      bne;
    logic      jump;      // j / jal
    logic      alusrc;    // 1: immediate as operand B
    ext_t      ext;
    regdst_t   regdst;
    aluop_t    aluop;
  } ctrl_t;

  // R-type control output
  typedef struct packed {
    alu_op_t alucontrol;
    logic    shamt_src;  // 1: operand A is instr[10:6] (sll/srl/sra)
    logic    shift;      // shift: operand A is the amount, B the value
    logic    jr;         // jr / jalr
    logic    link;       // jalr writes PC+4
    logic    md_en;      // mult/multu/div/divu
    mdop_t   md_op;
    logic    mfhi, mflo, mthi, mtlo;
    logic    no_write;   // R-type that writes no GPR (jr, mult, div, mthi, mtlo)
  } rctrl_t;

endpackage
