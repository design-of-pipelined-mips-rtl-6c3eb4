// tb_alu_reg_bank: drives 8-bit operands and an ALU select, stores the
// result into chosen BRAMs and reads it back through the BRAM outputs and
// the muxes. Expected values come from a reference of the ALU operations
// and an array model of the BRAMs.
module tb_alu_reg_bank;
  logic clk = 0;
  logic [7:0] a, b;
  logic [3:0] alu_sel, msel;
  logic [7:0][5:0]  addr;
  logic [7:0]       we;
  logic [31:0]      alu_y, r;
  logic [7:0][31:0] dout;
  logic [3:0][31:0] o;
  logic [31:0] model [8][64];
  logic [31:0] expd [8];
  logic [7:0]  valid_word [8];
  int checks = 0, failures = 0;
  alu_reg_bank dut (.clk, .a, .b, .alu_sel, .addr, .we, .msel, .alu_y, .dout, .o);
  always #5 clk = ~clk;
  function automatic logic [31:0] ref_op(input logic [31:0] x, z, input logic [3:0] s);
    case (s)
      4'h0: return x & z;  4'h1: return x | z;  4'h2: return x + z;  4'h3: return x ^ z;
      4'h4: return ~(x | z); 4'h5: return z << x[4:0]; 4'h6: return x - z;
      4'h7: return (x < z) ? 1 : 0; 4'h8: return (x < z) ? 1 : 0;
      4'h9: return z >> x[4:0]; 4'hA: return z >> x[4:0]; 4'hB: return z;
      default: return 0;
    endcase
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    msel = 0; we = 0; addr = '0; a = 0; b = 0; alu_sel = 0;
    for (int i = 0; i < 1000; i++) begin
      a = 8'($urandom); b = 8'($urandom); alu_sel = 4'($urandom % 12); msel = 4'($urandom);
      if (i == 0) begin a = 8'h03; b = 8'h19; alu_sel = 4'h6; end   // 3 - 25
      we = 8'($urandom);
      for (int k = 0; k < 8; k++) addr[k] = 6'($urandom % 4);
      #1;
      r = ref_op({24'b0, a}, {24'b0, b}, alu_sel);
      checks++;
      if (alu_y !== r) begin failures++; $display("FAIL alu sel=%0d a=%h b=%h y=%h exp=%h", alu_sel, a, b, alu_y, r); end
      for (int k = 0; k < 8; k++) begin
        if (we[k]) model[k][addr[k]] = r;
        expd[k] = model[k][addr[k]];
      end
      @(posedge clk); #1;
      if (i >= 40) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (dout[k] !== expd[k]) begin failures++; if (failures < 10) $display("FAIL bram %0d", k); end
        end
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (o[m] !== (msel[m] ? expd[2*m+1] : expd[2*m])) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
