// tag_cache: the tag store of one cache way. For each of LINES lines it
// keeps a TAG_W-bit tag, a valid bit and, when HAS_DIRTY is 1 (data
// cache), a dirty bit; the instruction cache uses HAS_DIRTY = 0 and its
// dirty output is always 0. Read is combinational at index idx so the hit
// compare fits in the access cycle; a write (we) replaces tag, valid and
// dirty of line idx on the rising edge. Reset and invalidate clear every
// valid and dirty bit. The 26-bit tag, the valid and dirty bits and their
// clearing on reset follow the document; the invalidate input is the
// instruction cache's invalidate function.
module tag_cache #(
  parameter int unsigned LINES     = 4,
  parameter int unsigned TAG_W     = 26,
  parameter bit          HAS_DIRTY = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     invalidate,
  input  logic [$clog2(LINES)-1:0] idx,
  output logic [TAG_W-1:0]         tag_o,
  output logic                     valid_o,
  output logic                     dirty_o,
  input  logic                     we,
  input  logic [TAG_W-1:0]         tag_i,
  input  logic                     valid_i,
  input  logic                     dirty_i
);
  logic [TAG_W-1:0] tag   [LINES];
  logic [LINES-1:0] valid;
  logic [LINES-1:0] dirty;

  always_ff @(posedge clk) begin
    if (rst || invalidate) begin
      valid <= '0;
      dirty <= '0;
    end else if (we) begin
      valid[idx] <= valid_i;
      dirty[idx] <= HAS_DIRTY ? dirty_i : 1'b0;
    end
  end
  always_ff @(posedge clk) begin
    if (!rst && !invalidate && we) tag[idx] <= tag_i;
  end

  assign tag_o   = tag[idx];
  assign valid_o = valid[idx];
  assign dirty_o = HAS_DIRTY ? dirty[idx] : 1'b0;
endmodule
