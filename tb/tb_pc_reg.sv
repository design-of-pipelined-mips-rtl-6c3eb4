// tb_pc_reg: checks that the PC resets to zero, loads pc_next when enabled,
// holds when disabled, and that pc_plus4 is always pc + 4.
module tb_pc_reg;
  logic clk = 0, rst, en;
  logic [31:0] pc_next, pc, pc_plus4, model;
  int checks = 0, failures = 0;
  pc_reg dut (.clk, .rst, .en, .pc_next, .pc, .pc_plus4);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; en = 1; pc_next = 32'h1234;
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0; model = 0;
    for (int i = 0; i < 200; i++) begin
      en = ($urandom % 3) != 0;
      pc_next = $urandom;
      @(posedge clk);
      if (en) model = pc_next;
      #1;
      checks++;
      if (pc !== model || pc_plus4 !== model + 4) begin
        failures++; $display("FAIL i=%0d pc=%h exp=%h", i, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
