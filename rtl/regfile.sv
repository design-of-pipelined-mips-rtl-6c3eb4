// regfile: the MIPS general-purpose register file, NREGS words of WIDTH
// bits with two read ports (a1->rd1, a2->rd2) and one write port (a3, wd3,
// we3). Register 0 always reads as zero and is never written. Reads are
// combinational; the write happens on the rising clock edge. A read of the
// register being written in the same cycle returns the new value
// (write-first), so the W stage can hand its result to the D stage without
// a forwarding path; the document's textbook datapath writes in the first
// half cycle instead. A third read port (dbg_a -> dbg_d) lets a test bench
// inspect registers. All registers reset to zero.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] a1, a2, a3, dbg_a,
  input  logic                     we3,
  input  logic [WIDTH-1:0]         wd3,
  output logic [WIDTH-1:0]         rd1, rd2, dbg_d
);
  localparam int unsigned AW = $clog2(NREGS);
  logic [WIDTH-1:0] r [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we3 && a3 != '0) begin
      r[a3] <= wd3;
    end
  end

  function automatic logic [WIDTH-1:0] rd(input logic [AW-1:0] a);
    if (a == '0)              return '0;
    else if (we3 && a == a3)  return wd3;
    else                      return r[a];
  endfunction

  assign rd1   = rd(a1);
  assign rd2   = rd(a2);
  assign dbg_d = rd(dbg_a);
endmodule
