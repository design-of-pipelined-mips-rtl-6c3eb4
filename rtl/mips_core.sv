// mips_core: the five-stage pipelined MIPS integer core (fetch, decode,
// execute, memory, write-back) without its caches.
//
// Fetch: the PC register addresses the instruction cache (pcF -> instrF).
// If instrF is beq/bne and the branch history table predicts taken, the
// next PC is the branch target computed in fetch (pcbranchF), else PC+4.
// Decode: main control and R-type control decode the instruction, the
// register file is read, the immediate is extended (sign, zero or upper)
// and the branch is resolved with an equality comparator on forwarded
// operands. A wrong prediction, a jump (j/jal) or jr/jalr redirects the PC
// and flushes the instruction fetched behind it; the BHT is updated with
// the outcome. There is no branch delay slot. Execute: the 32-bit ALU
// (operands forwarded from M or W), the multiply/divide unit, and mfhi/mflo
// reading Hi/Lo with forwarding. Memory: loads and stores go to the data
// cache as word requests with byte enables; loaded bytes and halfwords are
// sign- or zero-extended. Write-back: ALU result, loaded data or PC+4
// (jal/jalr) is written to the register file; Hi/Lo are written here.
//
// The hazard unit stalls for load-use and branch-operand hazards and for
// instruction-cache misses, and freezes the whole pipeline while the data
// cache is busy (dcache_stall). Interface: pcF/instrF/icache_stall to the
// instruction cache; daddr/dwdata/dbe/dre/dwe, drdata and dcache_stall to
// the data cache; dbg_reg_addr/dbg_reg_data read a register. The stage
// structure and signal names follow the document's processor diagram; the
// instruction subset, the absence of a delay slot and the single-cycle
// multiply/divide are this design's choices.
module mips_core
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pcF,
  input  logic [31:0] instrF,
  input  logic        icache_stall,
  output logic [31:0] daddr,
  output logic [31:0] dwdata,
  output logic [3:0]  dbe,
  output logic        dre,
  output logic        dwe,
  input  logic [31:0] drdata,
  input  logic        dcache_stall,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data
);
  // ---------------- pipeline register contents ----------------
  typedef struct packed {
    logic [31:0] instr, pc, pcplus4;
    logic        predicted;
  } fd_t;
  typedef struct packed {
    ctrl_t       c;
    rctrl_t      r;
    logic        regwrite;
    memtoreg_t   memtoreg;
    logic [31:0] rd1, rd2, imm, pcplus4;
    logic [4:0]  rs, rt, shamt, writereg;
  } de_t;
  typedef struct packed {
    logic        regwrite, memread, memwrite, memunsigned;
    memtoreg_t   memtoreg;
    memsize_t    memsize;
    logic [31:0] aluout, writedata, pcplus4;
    logic [4:0]  writereg;
    logic        hiwrite, lowrite;
    logic [31:0] hival, loval;
  } em_t;
  typedef struct packed {
    logic        regwrite;
    memtoreg_t   memtoreg;
    logic [31:0] aluout, readdata, pcplus4;
    logic [4:0]  writereg;
    logic        hiwrite, lowrite;
    logic [31:0] hival, loval;
  } mw_t;

  fd_t fd; de_t de; em_t em; mw_t mw;

  logic stallF, stallD, flushD, flushE, freeze, lwstall, branchstall;
  logic forwardAD, forwardBD;
  logic [1:0] forwardAE, forwardBE, forwardHiE, forwardLoE;

  // ---------------- fetch ----------------
  logic [31:0] pcplus4F, pcnextF, signimmF, pcbranchF, redirect_pc;
  logic        branchF, predictF, redirectD;

  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .en(!stallF && !freeze), .pc_next(pcnextF), .pc(pcF), .pc_plus4(pcplus4F));

  assign branchF   = (instrF[31:26] == OP_BEQ) || (instrF[31:26] == OP_BNE);
  assign signimmF  = {{16{instrF[15]}}, instrF[15:0]};
  assign pcbranchF = pcplus4F + {signimmF[29:0], 2'b00};

  always_comb begin
    if (redirectD && !stallD)      pcnextF = redirect_pc;
    else if (branchF && predictF)  pcnextF = pcbranchF;
    else                           pcnextF = pcplus4F;
  end

  always_ff @(posedge clk) begin
    if (rst) fd <= '0;
    else if (!freeze) begin
      if (flushD)       fd <= '0;
      else if (!stallD) fd <= '{instr: instrF, pc: pcF, pcplus4: pcplus4F,
                                predicted: branchF && predictF};
    end
  end

  // ---------------- decode ----------------
  ctrl_t       ctrlD;
  rctrl_t      rcD;
  logic [5:0]  opD, functD;
  logic [4:0]  rsD, rtD, rdD, writeregD;
  logic [31:0] rd1D, rd2D, immD, srcAD, srcBD, pcbranchD, fwdM, resultW;
  logic        isR, jrD, equalD, takenD, mispredD, regwriteD;
  memtoreg_t   memtoregD;

  assign opD    = fd.instr[31:26];
  assign functD = fd.instr[5:0];
  assign rsD    = fd.instr[25:21];
  assign rtD    = fd.instr[20:16];
  assign rdD    = fd.instr[15:11];
  assign isR    = (opD == OP_RTYPE);

  main_control  u_mc (.op(opD), .ctrl(ctrlD));
  rtype_control u_rc (.aluop(ctrlD.aluop), .funct(functD), .rc(rcD));

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .rst, .a1(rsD), .a2(rtD), .a3(mw.writereg), .dbg_a(dbg_reg_addr),
    .we3(mw.regwrite), .wd3(resultW), .rd1(rd1D), .rd2(rd2D), .dbg_d(dbg_reg_data));

  imm_extend u_ext (.imm(fd.instr[15:0]), .mode(ctrlD.ext), .y(immD));

  assign srcAD     = forwardAD ? fwdM : rd1D;
  assign srcBD     = forwardBD ? fwdM : rd2D;
  assign equalD    = (srcAD == srcBD);
  assign takenD    = ctrlD.branch && (ctrlD.bne ? !equalD : equalD);
  assign pcbranchD = fd.pcplus4 + {immD[29:0], 2'b00};
  assign jrD       = isR && rcD.jr;
  assign mispredD  = ctrlD.branch && (takenD != fd.predicted);
  assign redirectD = mispredD || ctrlD.jump || jrD;

  always_comb begin
    if (jrD)               redirect_pc = srcAD;
    else if (ctrlD.jump)   redirect_pc = {fd.pcplus4[31:28], fd.instr[25:0], 2'b00};
    else if (takenD)       redirect_pc = pcbranchD;
    else                   redirect_pc = fd.pcplus4;
  end

  bht #(.ROWS(64), .CW(2)) u_bht (
    .clk, .rst, .rd_pc(pcF), .predict(predictF),
    .wr_en(ctrlD.branch && !stallD && !freeze), .wr_pc(fd.pc), .taken(takenD));

  always_comb begin
    unique case (ctrlD.regdst)
      DST_RD:  writeregD = rdD;
      DST_RA:  writeregD = 5'd31;
      default: writeregD = rtD;
    endcase
    regwriteD = ctrlD.regwrite && !(isR && rcD.no_write);
    memtoregD = (isR && rcD.link) ? RES_PC4 : ctrlD.memtoreg;
  end

  always_ff @(posedge clk) begin
    if (rst) de <= '0;
    else if (!freeze) begin
      if (flushE) de <= '0;
      else de <= '{c: ctrlD, r: rcD, regwrite: regwriteD, memtoreg: memtoregD,
                   rd1: rd1D, rd2: rd2D, imm: immD, pcplus4: fd.pcplus4,
                   rs: rsD, rt: rtD, shamt: fd.instr[10:6], writereg: writeregD};
    end
  end

  // ---------------- execute ----------------
  logic [31:0] srcAE, srcBE, aluA, aluB, aluY, mdhi, mdlo, hiE, loE, aluoutE;
  logic [31:0] hi_q, lo_q;
  logic        zero_unused;

  always_comb begin
    unique case (forwardAE)
      2'd2:    srcAE = fwdM;
      2'd1:    srcAE = resultW;
      default: srcAE = de.rd1;
    endcase
    unique case (forwardBE)
      2'd2:    srcBE = fwdM;
      2'd1:    srcBE = resultW;
      default: srcBE = de.rd2;
    endcase
    aluA = (de.r.shift && de.r.shamt_src) ? {27'd0, de.shamt} : srcAE;
    aluB = (de.c.alusrc && !de.r.shift) ? de.imm : srcBE;
    unique case (forwardHiE)
      2'd2:    hiE = em.hival;
      2'd1:    hiE = mw.hival;
      default: hiE = hi_q;
    endcase
    unique case (forwardLoE)
      2'd2:    loE = em.loval;
      2'd1:    loE = mw.loval;
      default: loE = lo_q;
    endcase
    aluoutE = de.r.mfhi ? hiE : de.r.mflo ? loE : aluY;
  end

  alu #(.WIDTH(32)) u_alu (.a(aluA), .b(aluB), .sel(de.r.alucontrol), .y(aluY), .zero(zero_unused));
  muldiv u_md (.a(srcAE), .b(srcBE), .op(de.r.md_op), .hi(mdhi), .lo(mdlo));

  always_ff @(posedge clk) begin
    if (rst) em <= '0;
    else if (!freeze)
      em <= '{regwrite: de.regwrite, memread: de.c.memread, memwrite: de.c.memwrite,
              memunsigned: de.c.memunsigned, memtoreg: de.memtoreg, memsize: de.c.memsize,
              aluout: aluoutE, writedata: srcBE, pcplus4: de.pcplus4, writereg: de.writereg,
              hiwrite: de.r.md_en || de.r.mthi, lowrite: de.r.md_en || de.r.mtlo,
              hival: de.r.md_en ? mdhi : srcAE, loval: de.r.md_en ? mdlo : srcAE};
  end

  // ---------------- memory ----------------
  logic [31:0] readdataM;
  logic [1:0]  bo;
  assign bo    = em.aluout[1:0];
  assign daddr = em.aluout;
  assign dre   = em.memread;
  assign dwe   = em.memwrite;
  assign fwdM  = (em.memtoreg == RES_PC4) ? em.pcplus4 : em.aluout;

  always_comb begin
    unique case (em.memsize)
      SZ_BYTE: begin dwdata = {4{em.writedata[7:0]}};  dbe = 4'b0001 << bo; end
      SZ_HALF: begin dwdata = {2{em.writedata[15:0]}}; dbe = bo[1] ? 4'b1100 : 4'b0011; end
      default: begin dwdata = em.writedata;            dbe = 4'b1111; end
    endcase
    unique case (em.memsize)
      SZ_BYTE: begin
        logic [7:0] byt;
        byt = drdata[8*bo +: 8];
        readdataM = em.memunsigned ? {24'd0, byt} : {{24{byt[7]}}, byt};
      end
      SZ_HALF: begin
        logic [15:0] hw;
        hw = bo[1] ? drdata[31:16] : drdata[15:0];
        readdataM = em.memunsigned ? {16'd0, hw} : {{16{hw[15]}}, hw};
      end
      default: readdataM = drdata;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) mw <= '0;
    else if (!freeze)
      mw <= '{regwrite: em.regwrite, memtoreg: em.memtoreg, aluout: em.aluout,
              readdata: readdataM, pcplus4: em.pcplus4, writereg: em.writereg,
              hiwrite: em.hiwrite, lowrite: em.lowrite, hival: em.hival, loval: em.loval};
  end

  // ---------------- write-back ----------------
  always_comb begin
    unique case (mw.memtoreg)
      RES_MEM: resultW = mw.readdata;
      RES_PC4: resultW = mw.pcplus4;
      default: resultW = mw.aluout;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_q <= '0;
      lo_q <= '0;
    end else begin
      if (mw.hiwrite) hi_q <= mw.hival;
      if (mw.lowrite) lo_q <= mw.loval;
    end
  end

  // ---------------- hazards ----------------
  hazard_unit u_hz (
    .rsD, .rtD, .rsE(de.rs), .rtE(de.rt),
    .branchD(ctrlD.branch), .jrD,
    .writeregE(de.writereg), .writeregM(em.writereg), .writeregW(mw.writereg),
    .regwriteE(de.regwrite), .regwriteM(em.regwrite), .regwriteW(mw.regwrite),
    .loadE(de.c.memread), .loadM(em.memread),
    .hiwriteM(em.hiwrite), .hiwriteW(mw.hiwrite), .lowriteM(em.lowrite), .lowriteW(mw.lowrite),
    .redirectD, .icache_stall, .dcache_stall,
    .forwardAD, .forwardBD, .forwardAE, .forwardBE, .forwardHiE, .forwardLoE,
    .stallF, .stallD, .flushD, .flushE, .freeze, .lwstall, .branchstall);
endmodule
