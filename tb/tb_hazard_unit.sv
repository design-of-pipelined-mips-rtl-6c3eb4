// tb_hazard_unit: random register numbers and stage flags; every output is
// compared with an independent re-statement of the forwarding, stall and
// flush rules written here.
module tb_hazard_unit;
  logic [4:0] rsD, rtD, rsE, rtE, writeregE, writeregM, writeregW;
  logic branchD, jrD, regwriteE, regwriteM, regwriteW, loadE, loadM;
  logic hiwriteM, hiwriteW, lowriteM, lowriteW, redirectD, icache_stall, dcache_stall;
  logic forwardAD, forwardBD, stallF, stallD, flushD, flushE, freeze, lwstall, branchstall;
  logic [1:0] forwardAE, forwardBE, forwardHiE, forwardLoE;
  int checks = 0, failures = 0;
  int n_lw = 0, n_br = 0;
  hazard_unit dut (.*);
  function automatic logic [1:0] fe(input logic [4:0] r);
    return (r != 0 && regwriteM && r == writeregM) ? 2 : (r != 0 && regwriteW && r == writeregW) ? 1 : 0;
  endfunction
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      // small register numbers so that matches are frequent
      rsD = 5'($urandom % 4); rtD = 5'($urandom % 4); rsE = 5'($urandom % 4); rtE = 5'($urandom % 4);
      writeregE = 5'($urandom % 4); writeregM = 5'($urandom % 4); writeregW = 5'($urandom % 4);
      {branchD, jrD, regwriteE, regwriteM, regwriteW, loadE, loadM} = 7'($urandom);
      {hiwriteM, hiwriteW, lowriteM, lowriteW, redirectD} = 5'($urandom);
      icache_stall = ($urandom % 4) == 0; dcache_stall = ($urandom % 4) == 0;
      #1;
      begin
        logic elw, ebr, esd;
        elw = loadE && writeregE != 0 && (writeregE == rsD || writeregE == rtD);
        ebr = (branchD || jrD) && (
               (regwriteE && writeregE != 0 && (writeregE == rsD || (branchD && writeregE == rtD))) ||
               (loadM && writeregM != 0 && (writeregM == rsD || (branchD && writeregM == rtD))));
        esd = elw || ebr || icache_stall;
        n_lw += elw; n_br += ebr;
        checks++;
        if (forwardAE !== fe(rsE) || forwardBE !== fe(rtE) ||
            forwardAD !== (rsD != 0 && regwriteM && rsD == writeregM) ||
            forwardBD !== (rtD != 0 && regwriteM && rtD == writeregM) ||
            forwardHiE !== (hiwriteM ? 2'd2 : hiwriteW ? 2'd1 : 2'd0) ||
            forwardLoE !== (lowriteM ? 2'd2 : lowriteW ? 2'd1 : 2'd0) ||
            lwstall !== elw || branchstall !== ebr || stallD !== esd || stallF !== esd ||
            flushE !== esd || flushD !== (redirectD && !esd) || freeze !== dcache_stall) begin
          failures++; if (failures < 10) $display("FAIL i=%0d", i);
        end
      end
    end
    checks++; if (n_lw == 0 || n_br == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
