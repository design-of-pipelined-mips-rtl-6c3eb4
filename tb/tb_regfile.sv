// tb_regfile: random writes and reads of the 32 x 32 register file against
// an array model: register 0 stays zero, reads are write-first, and the
// debug port agrees with the model.
module tb_regfile;
  logic clk = 0, rst, we3;
  logic [4:0] a1, a2, a3, dbg_a;
  logic [31:0] wd3, rd1, rd2, dbg_d;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  regfile dut (.clk, .rst, .a1, .a2, .a3, .dbg_a, .we3, .wd3, .rd1, .rd2, .dbg_d);
  always #5 clk = ~clk;
  function automatic logic [31:0] exp_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (we3 && a == a3) return wd3;
    return model[a];
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; dbg_a = 0; wd3 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we3 = $urandom % 2; a3 = 5'($urandom); wd3 = $urandom;
      a1 = 5'($urandom); a2 = (i % 4 == 0) ? a3 : 5'($urandom); dbg_a = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== exp_rd(a1) || rd2 !== exp_rd(a2) || dbg_d !== exp_rd(dbg_a)) begin
        failures++; $display("FAIL i=%0d a1=%0d rd1=%h exp=%h", i, a1, rd1, exp_rd(a1));
      end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
