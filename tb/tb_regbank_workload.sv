// tb_regbank_workload: replays the register-bank experiment: all eight
// BRAMs are written in the same cycle with one ALU result (32'hFFFF_FFFE,
// produced here as NOR of 8'h01 and 8'h00) at eight different 6-bit
// addresses (100000, 011111, 101010, 010101, 110011, 001100, 111000,
// 000111), then read back. Each BRAM output and every mux setting is
// checked, and the readback must appear one cycle after the address.
module tb_regbank_workload;
  logic clk = 0;
  logic [7:0] a, b;
  logic [3:0] alu_sel, msel;
  logic [7:0][5:0]  addr;
  logic [7:0]       we;
  logic [31:0]      alu_y;
  logic [7:0][31:0] dout;
  logic [3:0][31:0] o;
  int checks = 0, failures = 0;
  localparam logic [5:0] ADDRS [8] = '{6'b100000, 6'b011111, 6'b101010, 6'b010101,
                                       6'b110011, 6'b001100, 6'b111000, 6'b000111};
  alu_reg_bank dut (.clk, .a, .b, .alu_sel, .addr, .we, .msel, .alu_y, .dout, .o);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // clear the addressed words of every BRAM first
    a = 8'h00; b = 8'h00; alu_sel = 4'h0; msel = 4'h0; we = 8'hFF;
    for (int k = 0; k < 8; k++) addr[k] = ADDRS[k];
    @(posedge clk); #1;
    we = 8'h00; @(posedge clk); #1;
    for (int k = 0; k < 8; k++) begin
      checks++; if (dout[k] !== 32'h0) begin failures++; $display("FAIL clear %0d", k); end
    end
    // the experiment: one ALU result into all eight BRAMs
    a = 8'h01; b = 8'h00; alu_sel = 4'h4;   // NOR
    #1; checks++; if (alu_y !== 32'hFFFF_FFFE) begin failures++; $display("FAIL alu %h", alu_y); end
    we = 8'hFF;
    @(posedge clk); #1;
    we = 8'h00;
    // read back: same addresses, outputs valid after one clock
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) begin
      checks++; if (dout[k] !== 32'hFFFF_FFFE) begin failures++; $display("FAIL bram %0d = %h", k, dout[k]); end
    end
    for (int s = 0; s < 16; s++) begin
      msel = 4'(s); #1;
      for (int m = 0; m < 4; m++) begin
        checks++; if (o[m] !== 32'hFFFF_FFFE) begin failures++; $display("FAIL mux %0d", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
