// rtype_control: the ALU decoder. From the operation class chosen by the
// main control (aluop) and, for R-type instructions, the funct field, it
// produces the 4-bit ALU select and the R-type specials of
// mips_pkg::rctrl_t: shift with the shamt field or rs as amount, jr/jalr,
// the multiply/divide operation and the Hi/Lo moves, and whether the
// instruction writes no general register. Combinational. funct codes are
// the standard MIPS ones; add/sub do not trap on overflow (this design's
// choice). An unknown funct is a no-op.
module rtype_control (
  input  logic [2:0]       aluop,
  input  logic [5:0]       funct,
  output mips_pkg::rctrl_t rc
);
  import mips_pkg::*;
  always_comb begin
    rc = '0;
    rc.alucontrol = ALU_ADD;
    rc.md_op = MD_MULT;
    unique case (aluop_t'(aluop))
      AOP_ADD:  rc.alucontrol = ALU_ADD;
      AOP_SLT:  rc.alucontrol = ALU_SLT;
      AOP_SLTU: rc.alucontrol = ALU_SLTU;
      AOP_AND:  rc.alucontrol = ALU_AND;
      AOP_OR:   rc.alucontrol = ALU_OR;
      AOP_XOR:  rc.alucontrol = ALU_XOR;
      AOP_RTYPE: begin
        unique case (funct)
          F_ADD, F_ADDU: rc.alucontrol = ALU_ADD;
          F_SUB, F_SUBU: rc.alucontrol = ALU_SUB;
          F_AND:  rc.alucontrol = ALU_AND;
          F_OR:   rc.alucontrol = ALU_OR;
          F_XOR:  rc.alucontrol = ALU_XOR;
          F_NOR:  rc.alucontrol = ALU_NOR;
          F_SLT:  rc.alucontrol = ALU_SLT;
          F_SLTU: rc.alucontrol = ALU_SLTU;
          F_SLL:  begin rc.alucontrol = ALU_SLL; rc.shift = 1'b1; rc.shamt_src = 1'b1; end
          F_SRL:  begin rc.alucontrol = ALU_SRL; rc.shift = 1'b1; rc.shamt_src = 1'b1; end
          F_SRA:  begin rc.alucontrol = ALU_SRA; rc.shift = 1'b1; rc.shamt_src = 1'b1; end
          F_SLLV: begin rc.alucontrol = ALU_SLL; rc.shift = 1'b1; end
          F_SRLV: begin rc.alucontrol = ALU_SRL; rc.shift = 1'b1; end
          F_SRAV: begin rc.alucontrol = ALU_SRA; rc.shift = 1'b1; end
          F_JR:   begin rc.jr = 1'b1; rc.no_write = 1'b1; end
          F_JALR: begin rc.jr = 1'b1; rc.link = 1'b1; end
          F_MFHI: rc.mfhi = 1'b1;
          F_MFLO: rc.mflo = 1'b1;
          F_MTHI: begin rc.mthi = 1'b1; rc.no_write = 1'b1; end
          F_MTLO: begin rc.mtlo = 1'b1; rc.no_write = 1'b1; end
          F_MULT:  begin rc.md_en = 1'b1; rc.md_op = MD_MULT;  rc.no_write = 1'b1; end
          F_MULTU: begin rc.md_en = 1'b1; rc.md_op = MD_MULTU; rc.no_write = 1'b1; end
          F_DIV:   begin rc.md_en = 1'b1; rc.md_op = MD_DIV;   rc.no_write = 1'b1; end
          F_DIVU:  begin rc.md_en = 1'b1; rc.md_op = MD_DIVU;  rc.no_write = 1'b1; end
          default: rc.no_write = 1'b1;
        endcase
      end
      default: rc.alucontrol = ALU_ADD;
    endcase
  end
endmodule
