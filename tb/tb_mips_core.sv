// tb_mips_core: end-to-end test of the pipeline on its own. The core runs
// the test program of mips_ref_pkg from a unified 64-word memory modelled
// here; the instruction and data sides randomly report cache stalls (the
// fetched word is garbage while the instruction side stalls, and the data
// side freezes the pipeline). When the program reaches its halt loop, all
// registers, Hi/Lo and the memory are compared with the instruction-level
// reference model. The run is repeated with several stall densities, and
// each pipeline mechanism (forwarding to E from M and from W, forwarding to
// D, load-use stall, branch stall, correct taken prediction,
// misprediction, jump, jr, freeze) must occur at least once.
module tb_mips_core;
  import mips_ref_pkg::*;
  logic clk = 0, rst;
  logic [31:0] pcF, instrF, daddr, dwdata, drdata, dbg_reg_data;
  logic [3:0]  dbe;
  logic        dre, dwe, icache_stall, dcache_stall;
  logic [4:0]  dbg_reg_addr;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;
  int n_fwdEM = 0, n_fwdEW = 0, n_fwdD = 0, n_lw = 0, n_br = 0, n_predok = 0, n_mispred = 0,
      n_jump = 0, n_jr = 0, n_freeze = 0, n_istall = 0;
  int istall_pct, dstall_pct;

  mips_core dut (.clk, .rst, .pcF, .instrF, .icache_stall, .daddr, .dwdata, .dbe, .dre, .dwe,
                 .drdata, .dcache_stall, .dbg_reg_addr, .dbg_reg_data);
  always #5 clk = ~clk;

  assign instrF = icache_stall ? 32'hDEAD_BEEF : mem[pcF[7:2]];
  assign drdata = mem[daddr[7:2]];

  // random stall generation, decided just after each rising edge
  always @(posedge clk) begin
    #1;
    icache_stall <= !rst && (($urandom % 100) < istall_pct);
    dcache_stall <= !rst && (dre || dwe) && (($urandom % 100) < dstall_pct);
  end
  // stores complete when the data side is not stalling
  always @(posedge clk) begin
    if (!rst && dwe && !dcache_stall)
      for (int b = 0; b < 4; b++) if (dbe[b]) mem[daddr[7:2]][8*b +: 8] <= dwdata[8*b +: 8];
  end
  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (!dut.freeze) begin
      n_fwdEM   += (dut.forwardAE == 2) + (dut.forwardBE == 2);
      n_fwdEW   += (dut.forwardAE == 1) + (dut.forwardBE == 1);
      n_fwdD    += (dut.forwardAD && (dut.ctrlD.branch || dut.jrD)) + (dut.forwardBD && dut.ctrlD.branch);
      n_lw      += dut.lwstall;
      n_br      += dut.branchstall;
      n_istall  += icache_stall;
      if (!dut.stallD) begin
        n_mispred += dut.mispredD;
        n_predok  += dut.ctrlD.branch && dut.fd.predicted && dut.takenD;
        n_jump    += dut.ctrlD.jump;
        n_jr      += dut.jrD;
      end
    end else n_freeze++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_once(input int ip, input int dp);
    mips_ref ref_m;
    int cyc;
    logic [31:0] init [64];
    istall_pct = ip; dstall_pct = dp;
    load_program(init);
    ref_m = new();
    ref_m.mem = init;
    ref_m.run(1000);
    mem = init;
    rst = 1; dbg_reg_addr = 0;
    repeat (3) @(posedge clk);
    #2 rst = 0;
    cyc = 0;
    while (!(dut.fd.instr == HALT) && cyc < 5000) begin @(posedge clk); cyc++; end
    repeat (60) @(posedge clk);
    #2;
    checks++; if (cyc >= 5000) begin failures++; $display("FAIL halt not reached"); end
    for (int i = 0; i < 32; i++) begin
      dbg_reg_addr = 5'(i); #1;
      checks++;
      if (dbg_reg_data !== ref_m.r[i]) begin failures++; $display("FAIL r%0d = %h exp %h", i, dbg_reg_data, ref_m.r[i]); end
    end
    checks++; if (dut.hi_q !== ref_m.hi || dut.lo_q !== ref_m.lo) begin failures++; $display("FAIL hi/lo"); end
    for (int w = 0; w < 64; w++) begin
      checks++; if (mem[w] !== ref_m.mem[w]) begin failures++; $display("FAIL mem[%0d] %h exp %h", w, mem[w], ref_m.mem[w]); end
    end
    $display("run istall=%0d%% dstall=%0d%%: %0d cycles to halt, %0d instructions", ip, dp, cyc, ref_m.steps);
  endtask

  initial begin
    icache_stall = 0; dcache_stall = 0; istall_pct = 0; dstall_pct = 0;
    run_once(0, 0);
    run_once(20, 30);
    run_once(50, 60);
    checks++;
    if (n_fwdEM == 0 || n_fwdEW == 0 || n_fwdD == 0 || n_lw == 0 || n_br == 0 || n_predok == 0 ||
        n_mispred == 0 || n_jump == 0 || n_jr == 0 || n_freeze == 0 || n_istall == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("fwdEM=%0d fwdEW=%0d fwdD=%0d lwstall=%0d brstall=%0d predok=%0d mispred=%0d jump=%0d jr=%0d freeze=%0d istall=%0d",
             n_fwdEM, n_fwdEW, n_fwdD, n_lw, n_br, n_predok, n_mispred, n_jump, n_jr, n_freeze, n_istall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
