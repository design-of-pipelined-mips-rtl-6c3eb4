// tb_imm_extend: checks sign, zero and upper extension of random and edge
// 16-bit immediates against values built bit by bit in the test bench.
module tb_imm_extend;
  logic [15:0] imm;
  logic [1:0]  mode;
  logic [31:0] y, e;
  int checks = 0, failures = 0;
  imm_extend dut (.imm, .mode, .y);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      imm = (i == 0) ? 16'h8000 : (i == 1) ? 16'h7FFF : (i == 2) ? 16'hFFFF : 16'($urandom);
      for (int m = 0; m < 3; m++) begin
        mode = 2'(m); #1;
        case (m)
          0: e = (imm[15] ? 32'hFFFF0000 : 32'h0) | 32'(imm);
          1: e = 32'(imm);
          default: e = 32'(imm) * 32'h10000;
        endcase
        checks++;
        if (y !== e) begin failures++; $display("FAIL m=%0d imm=%h y=%h e=%h", m, imm, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
