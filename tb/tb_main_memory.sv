// tb_main_memory: loads words through the load port, then reads and writes
// them through the instruction and data ports, checking that rdy comes
// exactly LATENCY cycles after a request starts (counter cleared by
// rst_dly), that read data is right, and that a data-port write lands.
module tb_main_memory;
  localparam int LAT = 4;
  logic clk = 0, rst;
  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata, ld_addr, ld_wdata, ld_rdata;
  logic i_re, i_rst_dly, i_rdy, d_re, d_we, d_rst_dly, d_rdy, ld_we;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  main_memory #(.LINES(16), .LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    rst = 1; i_re = 0; i_rst_dly = 0; d_re = 0; d_we = 0; d_rst_dly = 0; ld_we = 0;
    i_addr = 0; d_addr = 0; d_wdata = 0; ld_addr = 0; ld_wdata = 0;
    @(posedge clk); #1; rst = 0;
    for (int w = 0; w < 64; w++) begin
      ld_we = 1; ld_addr = 32'(w * 4); ld_wdata = $urandom; model[w] = ld_wdata;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < 100; i++) begin
      // instruction port read
      i_addr = 32'(($urandom % 64) * 4);
      i_rst_dly = 1; @(posedge clk); #1; i_rst_dly = 0; i_re = 1; n = 1;
      while (!i_rdy) begin @(posedge clk); #1; n++; end
      checks++; if (n != LAT || i_rdata !== model[i_addr[7:2]]) begin failures++; $display("FAIL iread n=%0d", n); end
      @(posedge clk); #1; i_re = 0;
      // data port write then read back through the load port and the data port
      d_addr = 32'(($urandom % 64) * 4); d_wdata = $urandom;
      d_rst_dly = 1; @(posedge clk); #1; d_rst_dly = 0; d_we = 1; n = 1;
      while (!d_rdy) begin @(posedge clk); #1; n++; end
      model[d_addr[7:2]] = d_wdata;
      @(posedge clk); #1; d_we = 0;
      checks++; if (n != LAT) begin failures++; $display("FAIL write latency n=%0d", n); end
      ld_addr = d_addr; d_re = 1; n = 1; #1;
      checks++; if (ld_rdata !== model[d_addr[7:2]]) begin failures++; $display("FAIL write data"); end
      while (!d_rdy) begin @(posedge clk); #1; n++; end
      checks++; if (n != LAT || d_rdata !== model[d_addr[7:2]]) begin failures++; $display("FAIL dread"); end
      @(posedge clk); #1; d_re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
