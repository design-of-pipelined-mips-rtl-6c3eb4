// tb_dcache: drives the data store directly. Lines are filled through the
// fill port, then random byte-enabled CPU writes and reads are checked
// against a model of data, tags, valid and dirty bits; the write-back view
// (victim tag, line_word, dirty) is checked too.
module tb_dcache;
  logic clk = 0, rst, hit, dirty, cpu_we, fill_we, fill_last;
  logic [25:0] victim_tag;
  logic [31:0] addr, rdata, line_word, cpu_wdata, fill_data;
  logic [3:0]  cpu_be;
  logic [1:0]  fill_wsel;
  logic [31:0] md [4][4];
  logic [25:0] mt [4];
  logic        mv [4], mdirty [4];
  int checks = 0, failures = 0;
  dcache dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; cpu_we = 0; fill_we = 0; fill_last = 0; addr = 0; cpu_be = 0; cpu_wdata = 0; fill_wsel = 0; fill_data = 0;
    for (int l = 0; l < 4; l++) begin mv[l] = 0; mdirty[l] = 0; end
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int l;
      addr = {26'($urandom % 4), 2'($urandom), 2'($urandom), 2'b00};
      l = addr[5:4];
      #1;
      checks++;
      if (hit !== (mv[l] && mt[l] == addr[31:6]) || dirty !== (mv[l] && mdirty[l]) ||
          (mv[l] && victim_tag !== mt[l]) || (hit && rdata !== md[l][addr[3:2]])) begin
        failures++; if (failures < 10) $display("FAIL i=%0d addr=%h hit=%b", i, addr, hit);
      end
      if (hit) begin
        cpu_we = $urandom % 2; cpu_be = 4'($urandom); cpu_wdata = $urandom;
        @(posedge clk); #1;
        if (cpu_we) begin
          for (int b = 0; b < 4; b++) if (cpu_be[b]) md[l][addr[3:2]][8*b +: 8] = cpu_wdata[8*b +: 8];
          mdirty[l] = 1;
        end
        cpu_we = 0;
      end else begin
        // check write-back view of the old line, then fill
        for (int w = 0; w < 4; w++) begin
          fill_wsel = 2'(w); #1;
          if (mv[l]) begin checks++; if (line_word !== md[l][w]) begin failures++; $display("FAIL line_word"); end end
        end
        for (int w = 0; w < 4; w++) begin
          fill_we = 1; fill_wsel = 2'(w); fill_data = $urandom; fill_last = (w == 3);
          md[l][w] = fill_data;
          @(posedge clk); #1;
        end
        fill_we = 0; fill_last = 0;
        mt[l] = addr[31:6]; mv[l] = 1; mdirty[l] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
