// tb_icache_ctrl: the instruction-cache controller with the instruction
// store and main memory. A fetcher issues random word addresses and waits
// while stall is high; every delivered word is checked against the memory
// contents. Checks the miss penalty (1 + 4 x LATENCY stall cycles for a
// line fill), zero stall on hits, and uncached fetches (1 + LATENCY stall
// cycles each) while the cache is disabled.
module tb_icache_ctrl;
  localparam int LAT = 3;
  logic clk = 0, rst, enable, invalidate;
  logic [31:0] addr, instr;
  logic stall, use_bypass, fill_we, fill_last, mem_re, mem_rst_dly, mem_rdy, hit;
  logic [31:0] bypass_data, mem_addr, mem_rdata, rdata, d_rdata, ld_rdata;
  logic [1:0]  wsel;
  logic d_rdy;
  logic [31:0] ld_addr, ld_wdata;
  logic ld_we;
  int checks = 0, failures = 0, misses = 0, hits = 0, bypasses = 0;

  icache u_c (.clk, .rst, .invalidate, .addr, .touch(!stall), .hit, .rdata,
              .fill_we, .fill_last, .fill_wsel(wsel), .fill_data(mem_rdata));
  icache_ctrl dut (.clk, .rst, .req(1'b1), .enable, .hit, .addr, .stall, .use_bypass, .bypass_data,
                   .fill_we, .fill_last, .wsel, .mem_re, .mem_rst_dly, .mem_addr, .mem_rdata, .mem_rdy);
  main_memory #(.LINES(16), .LATENCY(LAT)) u_m (
    .clk, .rst, .i_addr(mem_addr), .i_re(mem_re), .i_rst_dly(mem_rst_dly), .i_rdata(mem_rdata), .i_rdy(mem_rdy),
    .d_addr(32'd0), .d_re(1'b0), .d_we(1'b0), .d_rst_dly(1'b0), .d_wdata(32'd0), .d_rdata, .d_rdy,
    .ld_we, .ld_addr, .ld_wdata, .ld_rdata);
  assign instr = use_bypass ? bypass_data : rdata;
  always #5 clk = ~clk;

  function automatic logic [31:0] word_of(input int w);
    return 32'h1000_0000 + 32'(w) * 32'h0101;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    rst = 1; enable = 1; invalidate = 0; addr = 0; ld_we = 0; ld_addr = 0; ld_wdata = 0;
    @(posedge clk); #1;
    for (int w = 0; w < 64; w++) begin ld_we = 1; ld_addr = 32'(4 * w); ld_wdata = word_of(w); @(posedge clk); #1; end
    ld_we = 0; rst = 0;
    for (int i = 0; i < 600; i++) begin
      enable = !(i >= 400 && i < 450);
      addr = 32'(($urandom % 64) * 4);
      n = 0;
      #1;
      while (stall) begin @(posedge clk); #1; n++; end
      checks++;
      if (instr !== word_of(addr[7:2])) begin failures++; if (failures < 10) $display("FAIL addr=%h instr=%h", addr, instr); end
      checks++;
      if (!enable) begin
        bypasses++;
        if (n != 1 + LAT) begin failures++; $display("FAIL bypass n=%0d", n); end
      end else if (n == 0) hits++;
      else begin
        misses++;
        if (n != 1 + 4 * LAT) begin failures++; $display("FAIL miss penalty n=%0d", n); end
      end
      @(posedge clk); #1;
    end
    checks++; if (misses == 0 || hits == 0 || bypasses == 0) failures++;
    $display("misses=%0d hits=%0d bypasses=%0d", misses, hits, bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
