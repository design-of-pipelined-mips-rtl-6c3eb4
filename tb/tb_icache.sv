// tb_icache: drives the fill port of the two-way instruction store
// directly. It fills lines, checks hits and returned words, and checks the
// replacement rule: a third line mapping to a full set evicts the way that
// was not used most recently. A model of both ways and the MRU bits is kept
// here; invalidate must empty the cache.
module tb_icache;
  logic clk = 0, rst, invalidate, touch, hit, fill_we, fill_last;
  logic [31:0] addr, rdata, fill_data;
  logic [1:0]  fill_wsel;
  // model: per set and way, tag (addr[31:4]) and valid; data derived from address
  logic [27:0] mtag [4][2];
  logic        mval [4][2];
  logic        mmru [4];
  int checks = 0, failures = 0, evictions = 0;
  icache dut (.clk, .rst, .invalidate, .addr, .touch, .hit, .rdata, .fill_we, .fill_last, .fill_wsel, .fill_data);
  always #5 clk = ~clk;
  function automatic logic [31:0] word_of(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'hA5A5_0000;
  endfunction
  task automatic fill_line(input logic [31:0] a);
    int s, v;
    s = a[5:4];
    v = !mval[s][0] ? 0 : !mval[s][1] ? 1 : !mmru[s];
    if (mval[s][0] && mval[s][1]) evictions++;
    addr = a;
    for (int w = 0; w < 4; w++) begin
      fill_we = 1; fill_wsel = 2'(w); fill_data = word_of({a[31:4], 2'(w), 2'b00});
      fill_last = (w == 3);
      @(posedge clk); #1;
    end
    fill_we = 0; fill_last = 0;
    mtag[s][v] = a[31:4]; mval[s][v] = 1; mmru[s] = v[0];
  endtask
  function automatic bit model_hit(input logic [31:0] a);
    int s; s = a[5:4];
    return (mval[s][0] && mtag[s][0] == a[31:4]) || (mval[s][1] && mtag[s][1] == a[31:4]);
  endfunction
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; invalidate = 0; touch = 0; fill_we = 0; fill_last = 0; addr = 0; fill_wsel = 0; fill_data = 0;
    for (int s = 0; s < 4; s++) begin mval[s][0] = 0; mval[s][1] = 0; mmru[s] = 0; end
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 1500; i++) begin
      // addresses from a small pool so that sets conflict
      addr = {22'($urandom % 3), 4'($urandom), 4'($urandom), 2'b00};
      touch = 1; #1;
      checks++;
      if (hit !== model_hit(addr) || (hit && rdata !== word_of(addr))) begin
        failures++; if (failures < 10) $display("FAIL i=%0d addr=%h hit=%b exp=%b", i, addr, hit, model_hit(addr));
      end
      if (model_hit(addr)) begin
        int s; s = addr[5:4];
        mmru[s] = (mval[s][1] && mtag[s][1] == addr[31:4]);
        @(posedge clk); #1;
      end else begin
        touch = 0;
        fill_line(addr);
      end
      if (i == 1000) begin
        invalidate = 1; @(posedge clk); #1; invalidate = 0;
        for (int s = 0; s < 4; s++) begin mval[s][0] = 0; mval[s][1] = 0; end
        checks++; #1; if (hit) begin failures++; $display("FAIL invalidate"); end
      end
    end
    checks++; if (evictions == 0) begin failures++; $display("FAIL no eviction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
