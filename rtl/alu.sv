// alu: arithmetic/logic unit with two WIDTH-bit operands and a 4-bit
// select, as in the 64-bit ALU block (A, B, ALU select, OUTPUT). The
// operations are and, or, add, xor, nor, sub, set-less-than (signed and
// unsigned), pass-B and the three shifts. For shifts B is the value and the
// low bits of A the amount, so the MIPS core can feed either the shamt field
// or rs into A. Purely combinational. The select encoding (mips_pkg::alu_op_t)
// is this design's choice; WIDTH defaults to the 64 bits of the block
// diagram and the MIPS core uses it at 32 bits.
module alu #(parameter int unsigned WIDTH = 64) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       sel,
  output logic [WIDTH-1:0] y,
  output logic             zero
);
  import mips_pkg::*;
  localparam int unsigned SW = $clog2(WIDTH);
  logic [SW-1:0]  sh;
  logic [WIDTH:0] diff;

  assign sh   = a[SW-1:0];
  assign diff = {1'b0, a} - {1'b0, b};

  always_comb begin
    unique case (alu_op_t'(sel))
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_ADD:   y = a + b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLL:   y = b << sh;
      ALU_SUB:   y = diff[WIDTH-1:0];
      ALU_SLT:   y = {{(WIDTH-1){1'b0}}, ($signed(a) < $signed(b))};
      ALU_SLTU:  y = {{(WIDTH-1){1'b0}}, diff[WIDTH]};
      ALU_SRL:   y = b >> sh;
      ALU_SRA:   y = $unsigned($signed(b) >>> sh);
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
