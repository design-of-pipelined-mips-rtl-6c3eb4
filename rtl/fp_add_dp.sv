// fp_add_dp: IEEE-754 double-precision adder/subtractor (s = a + b, or
// a - b when sub is high), combinational. Steps: unpack sign, 11-bit
// exponent and 52-bit fraction (hidden bit restored for normal numbers);
// order the operands by magnitude; align the smaller significand by the
// exponent difference, keeping guard, round and sticky bits; add or
// subtract the significands; normalise (right by one on a carry, left by
// the leading-zero count on a cancellation, stopping at the subnormal
// range); round to nearest, ties to even; repack, with overflow to
// infinity. Infinities and NaNs: any NaN operand or inf - inf gives the
// quiet NaN 7FF8_0000_0000_0000. c is the carry out of the significand
// addition. The sign/exponent/mantissa split and the sum/carry outputs
// follow the document's double-precision adder; rounding mode and special
// cases are this design's choice.
module fp_add_dp (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        sub,
  output logic [63:0] s,
  output logic        c
);
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic [5:0] lzc56(input logic [55:0] v);
    lzc56 = 6'd56;
    for (int i = 0; i < 56; i++) if (v[i]) lzc56 = 6'(55 - i);
  endfunction

  logic        sa, sb, sL, sS;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [11:0] eA, eB, eL, eS, e, e2;
  logic [52:0] mA, mB, mL, mS;
  logic [11:0] d;
  logic [55:0] tS, shS, m;
  logic        lost;
  logic [56:0] sum;
  logic [5:0]  lz, sh;
  logic [53:0] mr;
  logic        rup;

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63] ^ sub; eb = b[62:52]; fb = b[51:0];
    a_nan = (ea == 11'h7FF) && (fa != 0);
    b_nan = (eb == 11'h7FF) && (fb != 0);
    a_inf = (ea == 11'h7FF) && (fa == 0);
    b_inf = (eb == 11'h7FF) && (fb == 0);
    eA = (ea == 0) ? 12'd1 : {1'b0, ea};
    eB = (eb == 0) ? 12'd1 : {1'b0, eb};
    mA = {ea != 0, fa};
    mB = {eb != 0, fb};
    // order by magnitude
    if ({eA, mA} >= {eB, mB}) begin
      eL = eA; mL = mA; sL = sa; eS = eB; mS = mB; sS = sb;
    end else begin
      eL = eB; mL = mB; sL = sb; eS = eA; mS = mA; sS = sa;
    end
    // align with guard, round, sticky
    d  = eL - eS;
    tS = {mS, 3'b000};
    if (d >= 12'd56) begin
      shS  = '0;
      lost = (mS != 0);
    end else begin
      shS  = tS >> d[5:0];
      lost = (tS & ((56'd1 << d[5:0]) - 56'd1)) != 0;
    end
    shS[0] = shS[0] | lost;
    // add / subtract
    c = 1'b0;
    lz = '0; sh = '0;
    if (sL == sS) begin
      sum = {1'b0, mL, 3'b000} + {1'b0, shS};
      c   = sum[56];
      if (sum[56]) begin
        m = sum[56:1];
        m[0] = m[0] | sum[0];
        e = eL + 12'd1;
      end else begin
        m = sum[55:0];
        e = eL;
      end
    end else begin
      sum = {1'b0, mL, 3'b000} - {1'b0, shS};
      lz  = lzc56(sum[55:0]);
      sh  = (12'(lz) > eL - 12'd1) ? 6'(eL - 12'd1) : lz;
      m   = sum[55:0] << sh;
      e   = eL - 12'(sh);
    end
    // round to nearest even
    rup = m[2] && (m[1] || m[0] || m[3]);
    mr  = {1'b0, m[55:3]} + 54'(rup);
    e2  = e;
    if (mr[53]) begin
      mr = mr >> 1;
      e2 = e + 12'd1;
    end
    // pack
    if (a_nan || b_nan || (a_inf && b_inf && sa != sb))
      s = QNAN;
    else if (a_inf)
      s = {sa, 11'h7FF, 52'd0};
    else if (b_inf)
      s = {sb, 11'h7FF, 52'd0};
    else if (mr == 0)
      s = {(sa && sb), 63'd0};
    else if (e2 >= 12'h7FF)
      s = {sL, 11'h7FF, 52'd0};
    else if (!mr[52])
      s = {sL, 11'd0, mr[51:0]};
    else
      s = {sL, e2[10:0], mr[51:0]};
  end
endmodule
