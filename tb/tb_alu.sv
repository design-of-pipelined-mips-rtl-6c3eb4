// tb_alu: self-checking test of the 64-bit ALU. For 400 random operand
// pairs (plus edge values) and every select code it compares the output
// with a reference computed here with plain SystemVerilog operators.
module tb_alu;
  localparam int W = 64;
  logic [W-1:0] a, b, y, exp_y;
  logic [3:0]   sel;
  logic         zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(W)) dut (.a, .b, .sel, .y, .zero);

  function automatic logic [W-1:0] ref_alu(input logic [W-1:0] x, z, input logic [3:0] s);
    case (s)
      4'h0: return x & z;
      4'h1: return x | z;
      4'h2: return x + z;
      4'h3: return x ^ z;
      4'h4: return ~(x | z);
      4'h5: return z << x[5:0];
      4'h6: return x - z;
      4'h7: return (signed'(x) < signed'(z)) ? 1 : 0;
      4'h8: return (x < z) ? 1 : 0;
      4'h9: return z >> x[5:0];
      4'hA: return W'(signed'(z) >>> x[5:0]);
      4'hB: return z;
      default: return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (i == 0) begin a = 64'h8000_0000_0000_0000; b = 64'h1; end
      if (i == 1) begin a = 64'h3; b = 64'h19; end
      if (i == 2) begin a = 64'h5; b = 64'h5; end
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        exp_y = ref_alu(a, b, sel);
        checks++;
        if (y !== exp_y || zero !== (exp_y == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d a=%h b=%h y=%h exp=%h", s, a, b, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
