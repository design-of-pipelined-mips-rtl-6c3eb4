// tb_rtype_control: checks the ALU select and the R-type special controls
// for every supported funct code and for each non-R operation class.
module tb_rtype_control;
  import mips_pkg::*;
  logic [2:0] aluop;
  logic [5:0] funct;
  rctrl_t rc;
  int checks = 0, failures = 0;
  rtype_control dut (.aluop, .funct, .rc);
  task automatic t(input logic [2:0] ao, input logic [5:0] f, input logic [3:0] sel,
                   input logic sh, input logic shamt, input logic jr, input logic nw);
    aluop = ao; funct = f; #1; checks++;
    if (rc.alucontrol !== sel || rc.shift !== sh || rc.shamt_src !== shamt || rc.jr !== jr || rc.no_write !== nw) begin
      failures++; $display("FAIL aluop=%0d funct=%h sel=%h", ao, f, rc.alucontrol);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    t(1, 6'h20, 4'h2, 0, 0, 0, 0); t(1, 6'h21, 4'h2, 0, 0, 0, 0);
    t(1, 6'h22, 4'h6, 0, 0, 0, 0); t(1, 6'h23, 4'h6, 0, 0, 0, 0);
    t(1, 6'h24, 4'h0, 0, 0, 0, 0); t(1, 6'h25, 4'h1, 0, 0, 0, 0);
    t(1, 6'h26, 4'h3, 0, 0, 0, 0); t(1, 6'h27, 4'h4, 0, 0, 0, 0);
    t(1, 6'h2A, 4'h7, 0, 0, 0, 0); t(1, 6'h2B, 4'h8, 0, 0, 0, 0);
    t(1, 6'h00, 4'h5, 1, 1, 0, 0); t(1, 6'h02, 4'h9, 1, 1, 0, 0);
    t(1, 6'h03, 4'hA, 1, 1, 0, 0); t(1, 6'h04, 4'h5, 1, 0, 0, 0);
    t(1, 6'h06, 4'h9, 1, 0, 0, 0); t(1, 6'h07, 4'hA, 1, 0, 0, 0);
    t(1, 6'h08, 4'h2, 0, 0, 1, 1); t(1, 6'h09, 4'h2, 0, 0, 1, 0);
    t(1, 6'h18, 4'h2, 0, 0, 0, 1); t(1, 6'h1B, 4'h2, 0, 0, 0, 1);
    t(1, 6'h11, 4'h2, 0, 0, 0, 1); t(1, 6'h3F, 4'h2, 0, 0, 0, 1);
    t(0, 6'h22, 4'h2, 0, 0, 0, 0); t(2, 6'h00, 4'h7, 0, 0, 0, 0);
    t(3, 6'h00, 4'h8, 0, 0, 0, 0); t(4, 6'h00, 4'h0, 0, 0, 0, 0);
    t(5, 6'h00, 4'h1, 0, 0, 0, 0); t(6, 6'h00, 4'h3, 0, 0, 0, 0);
    aluop = 1; funct = 6'h1A; #1; checks++; if (!rc.md_en || rc.md_op != MD_DIV) failures++;
    funct = 6'h19; #1; checks++; if (!rc.md_en || rc.md_op != MD_MULTU) failures++;
    funct = 6'h10; #1; checks++; if (!rc.mfhi || rc.no_write) failures++;
    funct = 6'h12; #1; checks++; if (!rc.mflo) failures++;
    funct = 6'h13; #1; checks++; if (!rc.mtlo) failures++;
    funct = 6'h09; #1; checks++; if (!rc.link) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
