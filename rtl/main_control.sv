// main_control: decodes the 6-bit opcode of the instruction in the decode
// stage into the datapath controls of mips_pkg::ctrl_t: register write and
// its source (ALU, memory, PC+4), memory read/write with access size and
// signedness, branch (beq/bne), jump (j/jal), immediate as ALU operand and
// how it is extended, destination register (rt, rd or $31) and the ALU
// operation class passed on to the R-type control. Combinational. Which
// opcodes are supported and the control encodings are this design's choice
// (the document names the signals only). An unknown opcode decodes to a
// no-op (no register or memory write).
module main_control (
  input  logic [5:0]      op,
  output mips_pkg::ctrl_t ctrl
);
  import mips_pkg::*;
  always_comb begin
    ctrl = '0;               // all off: no-op
    ctrl.memtoreg = RES_ALU;
    ctrl.memsize  = SZ_WORD;
    ctrl.ext      = EXT_SIGN;
    ctrl.regdst   = DST_RT;
    ctrl.aluop    = AOP_ADD;
    unique case (op)
      OP_RTYPE: begin ctrl.regwrite = 1'b1; ctrl.regdst = DST_RD; ctrl.aluop = AOP_RTYPE; end
      OP_J:     ctrl.jump = 1'b1;
      OP_JAL:   begin ctrl.jump = 1'b1; ctrl.regwrite = 1'b1; ctrl.regdst = DST_RA;
                      ctrl.memtoreg = RES_PC4; end
      OP_BEQ:   ctrl.branch = 1'b1;
      OP_BNE:   begin ctrl.branch = 1'b1; ctrl.bne = 1'b1; end
      OP_ADDI, OP_ADDIU: begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; end
      OP_SLTI:  begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_SLT; end
      OP_SLTIU: begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_SLTU; end
      OP_ANDI:  begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_AND; ctrl.ext = EXT_ZERO; end
      OP_ORI:   begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_OR;  ctrl.ext = EXT_ZERO; end
      OP_XORI:  begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_XOR; ctrl.ext = EXT_ZERO; end
      OP_LUI:   begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.ext = EXT_UPPER; end
      OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU: begin
        ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.memread = 1'b1; ctrl.memtoreg = RES_MEM;
        ctrl.memsize  = (op == OP_LW) ? SZ_WORD : (op == OP_LH || op == OP_LHU) ? SZ_HALF : SZ_BYTE;
        ctrl.memunsigned = (op == OP_LHU || op == OP_LBU);
      end
      OP_SW, OP_SH, OP_SB: begin
        ctrl.alusrc = 1'b1; ctrl.memwrite = 1'b1;
        ctrl.memsize = (op == OP_SW) ? SZ_WORD : (op == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      default: ;
    endcase
  end
endmodule
