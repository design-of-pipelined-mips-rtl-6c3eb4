// tb_main_control: for every opcode of the supported subset (and a few
// unsupported ones) checks the decoded register write, memory read/write,
// access size, branch, jump, immediate source and destination register
// against a table written out here.
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  main_control dut (.op, .ctrl);
  // expected {regwrite, memread, memwrite, branch, jump, alusrc, regdst[1:0], memsize[1:0], ext[1:0]}
  task automatic expect_op(input logic [5:0] o, input logic [11:0] e);
    logic [11:0] got;
    op = o; #1;
    got = {ctrl.regwrite, ctrl.memread, ctrl.memwrite, ctrl.branch, ctrl.jump, ctrl.alusrc,
           ctrl.regdst, ctrl.memsize, ctrl.ext};
    checks++;
    if (got !== e) begin failures++; $display("FAIL op=%h got=%b exp=%b", o, got, e); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    expect_op(6'h00, 12'b1_0_0_0_0_0_01_00_00);   // R-type -> rd
    expect_op(6'h02, 12'b0_0_0_0_1_0_00_00_00);   // j
    expect_op(6'h03, 12'b1_0_0_0_1_0_10_00_00);   // jal -> $31
    expect_op(6'h04, 12'b0_0_0_1_0_0_00_00_00);   // beq
    expect_op(6'h05, 12'b0_0_0_1_0_0_00_00_00);   // bne
    expect_op(6'h08, 12'b1_0_0_0_0_1_00_00_00);   // addi
    expect_op(6'h0C, 12'b1_0_0_0_0_1_00_00_01);   // andi zero-ext
    expect_op(6'h0D, 12'b1_0_0_0_0_1_00_00_01);   // ori
    expect_op(6'h0F, 12'b1_0_0_0_0_1_00_00_10);   // lui upper
    expect_op(6'h23, 12'b1_1_0_0_0_1_00_00_00);   // lw
    expect_op(6'h21, 12'b1_1_0_0_0_1_00_01_00);   // lh
    expect_op(6'h24, 12'b1_1_0_0_0_1_00_10_00);   // lbu
    expect_op(6'h2B, 12'b0_0_1_0_0_1_00_00_00);   // sw
    expect_op(6'h28, 12'b0_0_1_0_0_1_00_10_00);   // sb
    expect_op(6'h29, 12'b0_0_1_0_0_1_00_01_00);   // sh
    expect_op(6'h3F, 12'b0_0_0_0_0_0_00_00_00);   // unknown -> no-op
    expect_op(6'h11, 12'b0_0_0_0_0_0_00_00_00);   // coprocessor -> no-op
    // extra fields
    op = 6'h05; #1; checks++; if (!ctrl.bne) failures++;
    op = 6'h04; #1; checks++; if (ctrl.bne) failures++;
    op = 6'h25; #1; checks++; if (!ctrl.memunsigned || ctrl.memtoreg != RES_MEM) failures++;
    op = 6'h20; #1; checks++; if (ctrl.memunsigned) failures++;
    op = 6'h24; #1; checks++; if (!ctrl.memunsigned || ctrl.memtoreg != RES_MEM) failures++;
    op = 6'h21; #1; checks++; if (ctrl.memunsigned) failures++;
    op = 6'h03; #1; checks++; if (ctrl.memtoreg != RES_PC4) failures++;
    op = 6'h0A; #1; checks++; if (ctrl.aluop != AOP_SLT) failures++;
    op = 6'h0E; #1; checks++; if (ctrl.aluop != AOP_XOR) failures++;
    op = 6'h00; #1; checks++; if (ctrl.aluop != AOP_RTYPE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
