// tb_bht: trains the 64-row table of 2-bit counters with random outcomes at
// random PCs and compares every prediction with a counter model kept here;
// also checks the reset state (weakly not taken) and saturation.
module tb_bht;
  logic clk = 0, rst, predict, wr_en, taken;
  logic [31:0] rd_pc, wr_pc;
  int model [64];
  int checks = 0, failures = 0;
  bht dut (.clk, .rst, .rd_pc, .predict, .wr_en, .wr_pc, .taken);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; wr_en = 0; taken = 0; rd_pc = 0; wr_pc = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 64; i++) model[i] = 1;
    // saturate entry 5 towards taken: 1 -> 2 -> 3 -> 3
    for (int k = 0; k < 3; k++) begin
      wr_en = 1; wr_pc = 32'h14; taken = 1; @(posedge clk); #1;
      model[5] = (model[5] < 3) ? model[5] + 1 : 3;
    end
    wr_en = 0; taken = 0;
    // one not-taken keeps it predicting taken (3 -> 2)
    wr_en = 1; wr_pc = 32'h14; @(posedge clk); #1; model[5] = 2; wr_en = 0;
    rd_pc = 32'h14; #1; checks++; if (predict !== 1'b1) begin failures++; $display("FAIL hysteresis"); end
    for (int i = 0; i < 3000; i++) begin
      rd_pc = $urandom; wr_pc = $urandom % 1024; wr_en = $urandom % 2; taken = ($urandom % 4) != 0;
      #1;
      checks++;
      if (predict !== (model[rd_pc[7:2]] >= 2)) begin failures++; if (failures < 10) $display("FAIL i=%0d", i); end
      @(posedge clk);
      if (wr_en) begin
        if (taken && model[wr_pc[7:2]] < 3) model[wr_pc[7:2]]++;
        else if (!taken && model[wr_pc[7:2]] > 0) model[wr_pc[7:2]]--;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
