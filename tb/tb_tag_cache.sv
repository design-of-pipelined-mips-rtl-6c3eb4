// tb_tag_cache: random tag writes against a model of tags, valid and dirty
// bits; checks that reset and invalidate clear all valid and dirty bits,
// and that the instruction variant (no dirty bit) never reports dirty.
module tb_tag_cache;
  logic clk = 0, rst, invalidate, we, valid_i, dirty_i;
  logic [1:0]  idx;
  logic [25:0] tag_i, tag_o, tag_o2;
  logic valid_o, dirty_o, valid_o2, dirty_o2;
  logic [25:0] mt [4];
  logic mv [4], md [4];
  int checks = 0, failures = 0;
  tag_cache #(.HAS_DIRTY(1'b1)) dut (.clk, .rst, .invalidate, .idx, .tag_o, .valid_o, .dirty_o,
                                    .we, .tag_i, .valid_i, .dirty_i);
  tag_cache #(.HAS_DIRTY(1'b0)) dut_i (.clk, .rst, .invalidate, .idx, .tag_o(tag_o2), .valid_o(valid_o2),
                                      .dirty_o(dirty_o2), .we, .tag_i, .valid_i, .dirty_i);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; invalidate = 0; we = 0; idx = 0; tag_i = 0; valid_i = 0; dirty_i = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 4; i++) begin mv[i] = 0; md[i] = 0; mt[i] = 0; end
    for (int i = 0; i < 4; i++) begin
      idx = 2'(i); #1; checks++;
      if (valid_o || dirty_o || valid_o2) begin failures++; $display("FAIL reset state"); end
    end
    for (int i = 0; i < 2000; i++) begin
      idx = 2'($urandom); we = $urandom % 2; tag_i = 26'($urandom);
      valid_i = ($urandom % 4) != 0; dirty_i = $urandom % 2;
      invalidate = ($urandom % 50) == 0;
      #1;
      checks++;
      if (valid_o !== mv[idx] || dirty_o !== md[idx] || (mv[idx] && tag_o !== mt[idx]) ||
          valid_o2 !== mv[idx] || dirty_o2 !== 1'b0 || (mv[idx] && tag_o2 !== mt[idx])) begin
        failures++; if (failures < 10) $display("FAIL i=%0d idx=%0d", i, idx);
      end
      @(posedge clk);
      if (invalidate) for (int k = 0; k < 4; k++) begin mv[k] = 0; md[k] = 0; end
      else if (we) begin mt[idx] = tag_i; mv[idx] = valid_i; md[idx] = dirty_i; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
