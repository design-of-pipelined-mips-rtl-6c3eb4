// muldiv: the multiply/divide unit of the execute stage. It takes two
// 32-bit operands and an operation (mult, multu, div, divu) and returns the
// pair written to the Hi and Lo registers: for multiplies Hi:Lo is the
// 64-bit product, for divides Lo is the quotient and Hi the remainder
// (signed divide truncates towards zero, remainder has the dividend's
// sign). Division by zero returns Lo = all ones and Hi = the dividend.
// Combinational, one execute cycle; the document names the unit but gives
// neither its algorithm nor its latency, so both are this design's choice.
module muldiv (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [1:0]  op,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  import mips_pkg::*;
  logic [63:0] ps, pu;
  logic        neg_q, neg_r;
  logic [31:0] ua, ub, uq, ur, sq, sr;

  assign ps = $unsigned($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
  assign pu = {32'b0, a} * {32'b0, b};

  // Signed divide through the magnitudes
  always_comb begin
    neg_q = a[31] ^ b[31];
    neg_r = a[31];
    ua = a[31] ? -a : a;
    ub = b[31] ? -b : b;
    uq = (ub == 0) ? 32'hFFFF_FFFF : ua / ub;
    ur = (ub == 0) ? ua : ua % ub;
    sq = (b == 0) ? 32'hFFFF_FFFF : (neg_q ? -uq : uq);
    sr = (b == 0) ? a : (neg_r ? -ur : ur);
  end

  always_comb begin
    unique case (mdop_t'(op))
      MD_MULT:  {hi, lo} = ps;
      MD_MULTU: {hi, lo} = pu;
      MD_DIV:   begin lo = sq; hi = sr; end
      MD_DIVU:  begin lo = (b == 0) ? 32'hFFFF_FFFF : a / b; hi = (b == 0) ? a : a % b; end
      default:  {hi, lo} = '0;
    endcase
  end
endmodule
