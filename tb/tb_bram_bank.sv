// tb_bram_bank: writes the common data word into random subsets of the
// eight BRAMs at independent addresses and checks every BRAM's registered
// read data and the four pair-muxes against an array model.
module tb_bram_bank;
  logic clk = 0;
  logic [7:0][5:0]  addr;
  logic [7:0]       we;
  logic [31:0]      wdata;
  logic [7:0][31:0] dout;
  logic [3:0]       msel;
  logic [3:0][31:0] o;
  logic [31:0] model [8][64];
  logic [31:0] expd [8];
  int checks = 0, failures = 0;
  bram_bank dut (.clk, .addr, .we, .wdata, .dout, .msel, .o);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // fill every word first so reads are defined
    for (int a = 0; a < 64; a++) begin
      we = '1; wdata = $urandom;
      for (int k = 0; k < 8; k++) begin addr[k] = 6'(a); model[k][a] = wdata; end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      we = 8'($urandom); wdata = $urandom; msel = 4'($urandom);
      for (int k = 0; k < 8; k++) addr[k] = 6'($urandom);
      for (int k = 0; k < 8; k++) begin
        if (we[k]) model[k][addr[k]] = wdata;
        expd[k] = model[k][addr[k]];
      end
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (dout[k] !== expd[k]) begin failures++; if (failures < 10) $display("FAIL bram %0d", k); end
      end
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (o[m] !== (msel[m] ? expd[2*m+1] : expd[2*m])) begin failures++; if (failures < 10) $display("FAIL mux %0d", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
