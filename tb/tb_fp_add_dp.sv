// tb_fp_add_dp: compares the double-precision adder with the simulator's
// own IEEE-754 double arithmetic (real), for additions and subtractions of
// random numbers with related exponents (so cancellation and rounding
// happen often), subnormals, zeros, infinities and NaNs.
module tb_fp_add_dp;
  logic [63:0] a, b, s, e;
  logic sub, c;
  int checks = 0, failures = 0;
  fp_add_dp dut (.a, .b, .sub, .s, .c);

  function automatic logic [63:0] rnd_num(input int kind);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (kind)
      0: v[62:52] = 11'(1023 + ($urandom % 8) - 4);         // near 1.0
      1: v[62:52] = 11'($urandom % 3);                       // subnormal / tiny
      2: v[62:52] = 11'(2046 - ($urandom % 2));             // near overflow
      default: ;                                             // anything
    endcase
    return v;
  endfunction

  function automatic bit is_nan(input logic [63:0] v);
    return v[62:52] == 11'h7FF && v[51:0] != 0;
  endfunction

  task automatic check1();
    real r;
    #1;
    r = sub ? ($bitstoreal(a) - $bitstoreal(b)) : ($bitstoreal(a) + $bitstoreal(b));
    e = $realtobits(r);
    checks++;
    if (is_nan(e) ? !is_nan(s) : (s !== e)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%0d s=%h exp=%h", a, b, sub, s, e);
    end
  endtask

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int k;
    int ncarry = 0;
    // value from the adder's waveform: 1.0 + (-1.0) style cancellation and fixed cases
    a = 64'h3FF0_0000_0000_0000; b = 64'hBFF0_0000_0000_0000; sub = 0; check1();
    a = 64'h3FF0_0000_0000_0000; b = 64'h3FF0_0000_0000_0000; sub = 0; check1();
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000; sub = 0; check1();
    a = 64'h7FF0_0000_0000_0000; b = 64'h3FF0_0000_0000_0000; sub = 1; check1();
    a = 64'h0000_0000_0000_0001; b = 64'h8000_0000_0000_0000; sub = 0; check1();
    a = 64'h7FEF_FFFF_FFFF_FFFF; b = 64'h7FEF_FFFF_FFFF_FFFF; sub = 0; check1();
    a = 64'h3FF0_0000_0000_0000; b = 64'h3CA0_0000_0000_0000; sub = 0; check1(); // tie to even
    a = 64'h3FF0_0000_0000_0001; b = 64'h3CA0_0000_0000_0000; sub = 0; check1(); // tie, round up
    a = 64'h8000_0000_0000_0000; b = 64'h8000_0000_0000_0000; sub = 0; check1(); // -0 + -0
    for (int i = 0; i < 20000; i++) begin
      k = $urandom % 5;
      a = rnd_num(k);
      b = rnd_num(k);
      if (i % 7 == 0) b[62:52] = a[62:52];
      if (i % 11 == 0) b[62:52] = a[62:52] - 11'($urandom % 60);
      sub = $urandom % 2;
      check1();
      ncarry += c;
    end
    checks++; if (ncarry == 0) begin failures++; $display("FAIL carry never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
