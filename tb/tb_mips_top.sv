// tb_mips_top: end-to-end test of the whole design at its default sizes.
// Processor part: the test program of mips_ref_pkg is written into main
// memory through the load port and run three times from reset: with the
// instruction cache enabled, with it disabled (uncached fetches), and
// enabled with an invalidate pulse in the middle of the run. After each run
// the registers, Hi/Lo and the memory contents as seen through the data
// cache (cached line if resident, else main memory) are compared with the
// instruction-level reference model. Every mechanism must happen at least
// once: I-cache miss, I-cache replacement of the non-MRU way, uncached
// fetch, invalidate, D-cache hit, clean miss, dirty write-back, load-use
// and branch stalls, forwarding, BHT correct prediction and misprediction,
// jump and jr. Second part: the ALU + BRAM bank and the double-precision
// adder are driven through their own ports and checked against reference
// values computed here.
module tb_mips_top;
  import mips_ref_pkg::*;
  logic clk = 0, rst, ic_enable, ic_invalidate, ld_we;
  logic [31:0] ld_addr, ld_wdata, ld_rdata, dbg_reg_data;
  logic [4:0]  dbg_reg_addr;
  logic [7:0]  bank_a, bank_b;
  logic [3:0]  bank_alu_sel, bank_msel;
  logic [7:0][5:0] bank_addr;
  logic [7:0]  bank_we;
  logic [31:0] bank_alu_y;
  logic [7:0][31:0] bank_dout;
  logic [3:0][31:0] bank_o;
  logic [63:0] fp_a, fp_b, fp_s;
  logic fp_sub, fp_c;
  int checks = 0, failures = 0;
  int n_imiss = 0, n_ievict = 0, n_ibypass = 0, n_inval = 0, n_dhit = 0, n_dclean = 0, n_ddirty = 0,
      n_lw = 0, n_br = 0, n_fwd = 0, n_predok = 0, n_mispred = 0, n_jump = 0, n_jr = 0, n_md = 0,
      n_bank = 0, n_fp = 0;
  int miss_run [3], run_idx = 0;

  mips_top dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_icache_ctrl.state == 2'd0 && dut.u_icache_ctrl.state_n == 2'd1) begin
      n_imiss++;
      if (dut.u_icache.way_valid == 2'b11) n_ievict++;
    end
    n_ibypass += dut.ic_use_bypass;
    n_inval   += ic_invalidate;
    if (dut.u_dcache_ctrl.state == 2'd0 && (dut.dre || dut.dwe)) begin
      if (dut.dc_hit) n_dhit++;
      else if (dut.dc_dirty) n_ddirty++;
      else n_dclean++;
    end
    if (!dut.u_core.freeze) begin
      n_lw  += dut.u_core.lwstall;
      n_br  += dut.u_core.branchstall;
      n_fwd += (dut.u_core.forwardAE != 0) + (dut.u_core.forwardBE != 0);
      n_md  += dut.u_core.de.r.md_en;
      if (!dut.u_core.stallD) begin
        n_mispred += dut.u_core.mispredD;
        n_predok  += dut.u_core.ctrlD.branch && dut.u_core.fd.predicted && dut.u_core.takenD;
        n_jump    += dut.u_core.ctrlD.jump;
        n_jr      += dut.u_core.jrD;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_program(input logic enable, input int inval_at);
    mips_ref ref_m;
    logic [31:0] init [64];
    int cyc, miss0;
    miss0 = n_imiss;
    load_program(init);
    ref_m = new(); ref_m.mem = init; ref_m.run(1000);
    rst = 1; ic_enable = enable; ic_invalidate = 0;
    for (int w = 0; w < 64; w++) begin
      ld_we = 1; ld_addr = 32'(4 * w); ld_wdata = init[w]; @(posedge clk); #1;
    end
    ld_we = 0; rst = 0; cyc = 0;
    while (!(dut.u_core.fd.instr == HALT) && cyc < 20000) begin
      @(posedge clk); #1; cyc++;
      ic_invalidate = (cyc == inval_at);
    end
    ic_invalidate = 0;
    repeat (200) @(posedge clk);
    #1;
    checks++; if (cyc >= 20000) begin failures++; $display("FAIL halt not reached"); end
    for (int i = 0; i < 32; i++) begin
      dbg_reg_addr = 5'(i); #1; checks++;
      if (dbg_reg_data !== ref_m.r[i]) begin failures++; $display("FAIL r%0d = %h exp %h", i, dbg_reg_data, ref_m.r[i]); end
    end
    checks++; if (dut.u_core.hi_q !== ref_m.hi || dut.u_core.lo_q !== ref_m.lo) begin failures++; $display("FAIL hi/lo"); end
    for (int w = 0; w < 64; w++) begin
      logic [31:0] got;
      int l;
      l = (w >> 2) & 3;
      ld_addr = 32'(4 * w); #1;
      if (dut.u_dcache.u_tags.valid[l] && dut.u_dcache.u_tags.tag[l] == 26'(w >> 4)) got = dut.u_dcache.data[l][w & 3];
      else got = ld_rdata;
      checks++; if (got !== ref_m.mem[w]) begin failures++; $display("FAIL mem[%0d] %h exp %h", w, got, ref_m.mem[w]); end
    end
    miss_run[run_idx] = n_imiss - miss0;
    run_idx++;
    $display("run enable=%0d invalidate@%0d: %0d cycles to halt, %0d instructions, %0d I-cache misses", enable, inval_at, cyc, ref_m.steps, n_imiss - miss0);
  endtask

  function automatic logic [31:0] ref_op(input logic [31:0] x, z, input logic [3:0] s);
    case (s)
      4'h0: return x & z; 4'h1: return x | z; 4'h2: return x + z; 4'h3: return x ^ z;
      4'h6: return x - z; default: return z;
    endcase
  endfunction

  initial begin
    rst = 1; ic_enable = 1; ic_invalidate = 0; ld_we = 0; ld_addr = 0; ld_wdata = 0; dbg_reg_addr = 0;
    bank_a = 0; bank_b = 0; bank_alu_sel = 0; bank_msel = 0; bank_addr = '0; bank_we = 0;
    fp_a = 0; fp_b = 0; fp_sub = 0;
    repeat (2) @(posedge clk); #1;
    run_program(1'b1, -1);
    run_program(1'b0, -1);
    run_program(1'b1, 60);
    // disabled cache: no line fills; invalidate mid-run: lines fetched again
    checks++; if (miss_run[1] != 0 || miss_run[2] <= miss_run[0]) begin failures++; $display("FAIL miss counts"); end

    // ALU + BRAM bank: write 8 results to 8 BRAMs at different addresses, read back
    begin
      logic [31:0] exp_v [8];
      int sels [6] = '{0, 1, 2, 3, 6, 11};
      for (int k = 0; k < 8; k++) begin
        bank_a = 8'(3 + 7 * k); bank_b = 8'(25 - k); bank_alu_sel = 4'(sels[k % 6]);
        bank_we = 8'(1 << k);
        for (int j = 0; j < 8; j++) bank_addr[j] = 6'(10 + k);
        #1; exp_v[k] = ref_op({24'h0, bank_a}, {24'h0, bank_b}, bank_alu_sel);
        checks++; if (bank_alu_y !== exp_v[k]) begin failures++; $display("FAIL bank alu"); end
        @(posedge clk); #1; n_bank++;
      end
      bank_we = 0;
      for (int j = 0; j < 8; j++) bank_addr[j] = 6'(10 + j);
      bank_msel = 4'b1010;
      @(posedge clk); #1;
      for (int j = 0; j < 8; j++) begin
        checks++; if (bank_dout[j] !== exp_v[j]) begin failures++; $display("FAIL bank dout %0d", j); end
      end
      for (int m = 0; m < 4; m++) begin
        checks++; if (bank_o[m] !== exp_v[2*m + bank_msel[m]]) begin failures++; $display("FAIL bank mux %0d", m); end
      end
    end
    // double-precision adder against the simulator's double arithmetic
    for (int i = 0; i < 200; i++) begin
      real r;
      fp_a = {$urandom, $urandom}; fp_b = {$urandom, $urandom}; fp_sub = $urandom % 2;
      fp_a[62:52] = 11'(1000 + $urandom % 40); fp_b[62:52] = 11'(1000 + $urandom % 40);
      #1;
      r = fp_sub ? $bitstoreal(fp_a) - $bitstoreal(fp_b) : $bitstoreal(fp_a) + $bitstoreal(fp_b);
      checks++; if (fp_s !== $realtobits(r)) begin failures++; $display("FAIL fp %h %h", fp_a, fp_b); end
      n_fp++;
    end

    $display("imiss=%0d ievict=%0d ibypass=%0d inval=%0d dhit=%0d dclean=%0d ddirty=%0d lwstall=%0d brstall=%0d fwd=%0d predok=%0d mispred=%0d jump=%0d jr=%0d muldiv=%0d bank=%0d fp=%0d",
             n_imiss, n_ievict, n_ibypass, n_inval, n_dhit, n_dclean, n_ddirty, n_lw, n_br, n_fwd,
             n_predok, n_mispred, n_jump, n_jr, n_md, n_bank, n_fp);
    checks++;
    if (n_imiss == 0 || n_ievict == 0 || n_ibypass == 0 || n_inval == 0 || n_dhit == 0 || n_dclean == 0 ||
        n_ddirty == 0 || n_lw == 0 || n_br == 0 || n_fwd == 0 || n_predok == 0 || n_mispred == 0 ||
        n_jump == 0 || n_jr == 0 || n_md == 0 || n_bank == 0 || n_fp == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
