// alu_reg_bank: an ALU whose result is stored in the eight-BRAM register
// bank. The 8-bit operands a and b are zero-extended to 32 bits, combined
// by the ALU under the 4-bit select alu_sel, and the 32-bit result is the
// common write data of all BRAMs; each BRAM writes it at its own address
// when its write enable is high. Outputs: alu_y (the ALU result, same
// cycle), dout (each BRAM's registered read data, one cycle after the
// address) and o (the four 2:1 muxes of BRAM pairs). The 8-bit operand
// width follows the document's diagram; widening to 32 bits before the ALU
// is this design's choice so the result fills the 32-bit BRAM words.
module alu_reg_bank #(
  parameter int unsigned IN_W = 8
) (
  input  logic               clk,
  input  logic [IN_W-1:0]    a,
  input  logic [IN_W-1:0]    b,
  input  logic [3:0]         alu_sel,
  input  logic [7:0][5:0]    addr,
  input  logic [7:0]         we,
  input  logic [3:0]         msel,
  output logic [31:0]        alu_y,
  output logic [7:0][31:0]   dout,
  output logic [3:0][31:0]   o
);
  logic zero_unused;
  alu #(.WIDTH(32)) u_alu (
    .a({{(32-IN_W){1'b0}}, a}), .b({{(32-IN_W){1'b0}}, b}),
    .sel(alu_sel), .y(alu_y), .zero(zero_unused));
  bram_bank #(.NBRAM(8), .AW(6), .DW(32), .NMUX(4)) u_bank (
    .clk, .addr, .we, .wdata(alu_y), .dout, .msel, .o);
endmodule
