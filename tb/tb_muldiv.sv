// tb_muldiv: random and edge operands for mult, multu, div and divu,
// compared with 64-bit products and with quotients/remainders computed
// here through signed and unsigned integer arithmetic.
module tb_muldiv;
  logic [31:0] a, b, hi, lo, eh, el;
  logic [1:0]  op;
  longint sp; longint unsigned up;
  int checks = 0, failures = 0;
  muldiv dut (.a, .b, .op, .hi, .lo);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = (i % 5 == 0) ? ($urandom % 17) - 8 : $urandom;
      if (i == 0) begin a = 32'h8000_0000; b = 32'hFFFF_FFFF; end
      if (i == 1) begin a = 32'd7; b = 32'hFFFF_FFFE; end
      if (i == 2) begin a = 32'd100; b = 0; end
      for (int o = 0; o < 4; o++) begin
        op = 2'(o); #1;
        case (o)
          0: begin sp = longint'(int'(a)) * longint'(int'(b)); {eh, el} = sp; end
          1: begin up = longint'({32'b0, a}) * longint'({32'b0, b}); {eh, el} = up; end
          2: if (b == 0) begin el = '1; eh = a; end
             else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin el = a; eh = 0; end
             else begin el = int'(a) / int'(b); eh = int'(a) % int'(b); end
          default: if (b == 0) begin el = '1; eh = a; end else begin el = a / b; eh = a % b; end
        endcase
        checks++;
        if (hi !== eh || lo !== el) begin
          failures++; if (failures < 10) $display("FAIL op=%0d a=%h b=%h hi=%h lo=%h exp %h %h", o, a, b, hi, lo, eh, el);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
