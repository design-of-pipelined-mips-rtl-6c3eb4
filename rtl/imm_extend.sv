// imm_extend: widens the 16-bit immediate of an I-type instruction to 32
// bits in one of three ways, selected by mode: sign extension (bit 15
// copied into the upper half), zero extension (upper half zero, for
// andi/ori/xori) or upper placement (immediate in bits 31:16, low half
// zero, for lui). Combinational. Sign and zero extension follow the
// document's two extension blocks; merging them with the lui shift into
// one unit with a mode input is this design's choice.
module imm_extend (
  input  logic [15:0] imm,
  input  logic [1:0]  mode,
  output logic [31:0] y
);
  import mips_pkg::*;
  always_comb begin
    unique case (ext_t'(mode))
      EXT_SIGN:  y = {{16{imm[15]}}, imm};
      EXT_ZERO:  y = {16'h0000, imm};
      EXT_UPPER: y = {imm, 16'h0000};
      default:   y = {{16{imm[15]}}, imm};
    endcase
  end
endmodule
