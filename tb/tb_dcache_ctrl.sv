// tb_dcache_ctrl: the data-cache controller with the data store and main
// memory. Random word loads and byte/word stores over the whole 256-byte
// memory are issued and held while stall is high. Loads are checked
// against a flat memory model; at the end every line is forced out of the
// cache by conflicting loads and main memory is compared with the model,
// which shows that dirty lines were written back. Checks the stall lengths:
// 1 + 4 x LATENCY for a clean miss, 1 + 8 x LATENCY for a dirty miss.
module tb_dcache_ctrl;
  localparam int LAT = 2;
  logic clk = 0, rst;
  logic [31:0] addr, wdata, rdata, line_word, fill_data, mem_addr, i_rdata, ld_rdata;
  logic [3:0]  be;
  logic re, we, hit, dirty, stall, cpu_we, fill_we, fill_last, mem_re, mem_we, mem_rst_dly, addr_sel, mem_rdy, i_rdy;
  logic [1:0]  wsel;
  logic [25:0] victim_tag;
  logic [31:0] ld_addr;
  logic [31:0] model [64];
  int checks = 0, failures = 0, clean_miss = 0, dirty_miss = 0, hits = 0;

  dcache u_c (.clk, .rst, .addr, .hit, .dirty, .victim_tag, .rdata, .line_word,
              .cpu_we, .cpu_be(be), .cpu_wdata(wdata), .fill_we, .fill_last, .fill_wsel(wsel), .fill_data);
  dcache_ctrl dut (.clk, .rst, .re, .we, .hit, .dirty, .mem_rdy, .stall, .cpu_we, .fill_we, .fill_last,
                   .wsel, .mem_re, .mem_we, .mem_rst_dly, .addr_sel);
  assign mem_addr = addr_sel ? {victim_tag, addr[5:4], wsel, 2'b00} : {addr[31:4], wsel, 2'b00};
  main_memory #(.LINES(16), .LATENCY(LAT)) u_m (
    .clk, .rst, .i_addr(32'd0), .i_re(1'b0), .i_rst_dly(1'b0), .i_rdata, .i_rdy,
    .d_addr(mem_addr), .d_re(mem_re), .d_we(mem_we), .d_rst_dly(mem_rst_dly), .d_wdata(line_word),
    .d_rdata(fill_data), .d_rdy(mem_rdy), .ld_we(1'b0), .ld_addr, .ld_wdata(32'd0), .ld_rdata);
  always #5 clk = ~clk;

  task automatic access(input logic [31:0] a, input logic w, input logic [3:0] b, input logic [31:0] d);
    int n; logic was_dirty;
    addr = a; re = !w; we = w; be = b; wdata = d; n = 0;
    #1;
    was_dirty = dirty && !hit;
    while (stall) begin @(posedge clk); #1; n++; end
    checks++;
    if (n == 0) hits++;
    else if (was_dirty) begin dirty_miss++; if (n != 1 + 8 * LAT) begin failures++; $display("FAIL dirty n=%0d", n); end end
    else begin clean_miss++; if (n != 1 + 4 * LAT) begin failures++; $display("FAIL clean n=%0d", n); end end
    if (!w) begin
      checks++;
      if (rdata !== model[a[7:2]]) begin failures++; if (failures < 10) $display("FAIL load %h got %h exp %h", a, rdata, model[a[7:2]]); end
    end else begin
      for (int k = 0; k < 4; k++) if (b[k]) model[a[7:2]][8*k +: 8] = d[8*k +: 8];
    end
    @(posedge clk); #1;
    re = 0; we = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; re = 0; we = 0; addr = 0; be = 0; wdata = 0; ld_addr = 0;
    @(posedge clk); #1;
    for (int w = 0; w < 64; w++) begin u_m.mem[w] = 32'(w) * 32'h0100_0001; model[w] = u_m.mem[w]; end
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic w;
      w = $urandom % 2;
      access(32'(($urandom % 64) * 4), w, w ? ((i % 3 == 0) ? 4'(1 << ($urandom % 4)) : 4'hF) : 4'h0, $urandom);
    end
    // flush: touch two other tags for every index
    for (int k = 0; k < 64; k += 4) access(32'(k * 4), 0, 0, 0);
    for (int k = 0; k < 64; k += 4) access(32'(k * 4 ^ 32'h40), 0, 0, 0);
    for (int k = 0; k < 64; k += 4) access(32'(k * 4 ^ 32'h80), 0, 0, 0);
    for (int w = 0; w < 64; w++) begin
      ld_addr = 32'(w * 4); #1;
      // words still cached and dirty may legally differ: only lines not resident are compared
      if (!(u_c.u_tags.valid[w[3:2]] && u_c.u_tags.tag[w[3:2]] == 26'(w >> 4))) begin
        checks++;
        if (ld_rdata !== model[w]) begin failures++; if (failures < 10) $display("FAIL memory word %0d", w); end
      end
    end
    checks++; if (clean_miss == 0 || dirty_miss == 0 || hits == 0) failures++;
    $display("hits=%0d clean_miss=%0d dirty_miss=%0d", hits, clean_miss, dirty_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
