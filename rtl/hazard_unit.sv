// hazard_unit: forwarding selects, stalls and flushes for the five-stage
// pipeline. Forwarding: an E-stage operand takes the M-stage result
// (forwardXE = 2) or the W-stage result (1) when that stage writes its
// register; the D-stage branch comparator and jr take the M-stage result
// (forwardXD = 1); results in W reach D through the write-first register
// file. Hi/Lo reads in E are forwarded the same way (2 = M, 1 = W).
// Stalls: a load in E whose target is rs or rt of the D instruction
// (load-use), a branch or jr in D whose operand is still computed in E or
// loaded in M, and an instruction-cache miss all stall F and D and put a
// bubble into E. A taken redirect in D (BHT misprediction or jump) that is
// not stalled flushes the F->D register. A data-cache miss freezes every
// stage (freeze). Combinational. The load-use stall follows the document's
// hazard unit; the rest is the classic MIPS scheme and this design's
// choice where the document is silent. freeze is the data-cache stall
// passed straight through; it is an output here so that all stall and
// flush decisions come from one unit.
module hazard_unit (
  input  logic [4:0] rsD, rtD, rsE, rtE,
  input  logic       branchD, jrD,
  input  logic [4:0] writeregE, writeregM, writeregW,
  input  logic       regwriteE, regwriteM, regwriteW,
  input  logic       loadE, loadM,
  input  logic       hiwriteM, hiwriteW, lowriteM, lowriteW,
  input  logic       redirectD,
  input  logic       icache_stall, dcache_stall,
  output logic       forwardAD, forwardBD,
  output logic [1:0] forwardAE, forwardBE,
  output logic [1:0] forwardHiE, forwardLoE,
  output logic       stallF, stallD, flushD, flushE, freeze,
  output logic       lwstall, branchstall
);
  function automatic logic [1:0] fwdE(input logic [4:0] r);
    if (r != 5'd0 && regwriteM && r == writeregM)      return 2'd2;
    else if (r != 5'd0 && regwriteW && r == writeregW) return 2'd1;
    else                                               return 2'd0;
  endfunction

  always_comb begin
    forwardAE  = fwdE(rsE);
    forwardBE  = fwdE(rtE);
    forwardAD  = (rsD != 5'd0) && regwriteM && (rsD == writeregM);
    forwardBD  = (rtD != 5'd0) && regwriteM && (rtD == writeregM);
    forwardHiE = hiwriteM ? 2'd2 : hiwriteW ? 2'd1 : 2'd0;
    forwardLoE = lowriteM ? 2'd2 : lowriteW ? 2'd1 : 2'd0;

    lwstall     = loadE && (writeregE != 5'd0) && (writeregE == rsD || writeregE == rtD);
    branchstall = (branchD || jrD) &&
                  ((regwriteE && writeregE != 5'd0 &&
                    (writeregE == rsD || (branchD && writeregE == rtD))) ||
                   (loadM && writeregM != 5'd0 &&
                    (writeregM == rsD || (branchD && writeregM == rtD))));
    freeze = dcache_stall;
    stallD = lwstall || branchstall || icache_stall;
    stallF = stallD;
    flushE = stallD;
    flushD = redirectD && !stallD;
  end
endmodule
