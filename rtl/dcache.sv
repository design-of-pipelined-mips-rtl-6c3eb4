// dcache: direct-mapped write-back data store with its tag cache and hit
// compare. The address splits into tag (addr[31:4+IW], 26 bits for 4
// lines), line index (IW bits), word select (addr[3:2]) and byte offset.
// Combinational outputs: hit (valid and tag equal), dirty and victim_tag
// of the indexed line (for the write-back address), rdata (the addressed
// word) and line_word (word fill_wsel of the indexed line, the data written
// back). A CPU store on a hit (cpu_we) writes the bytes enabled by cpu_be
// and sets the dirty bit. A fill (fill_we) writes word fill_wsel from main
// memory; fill_last also writes the new tag, sets valid and clears dirty.
// Lines of 4 words W3..W0, 4 lines and the tag/valid/dirty bits follow the
// document's data-cache figure; byte enables are this design's choice for
// the sb/sh stores.
module dcache #(
  parameter int unsigned LINES = 4,
  parameter int unsigned WORDS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  output logic        hit,
  output logic        dirty,
  output logic [31-$clog2(LINES)-$clog2(WORDS)-2:0] victim_tag,
  output logic [31:0] rdata,
  output logic [31:0] line_word,
  input  logic        cpu_we,
  input  logic [3:0]  cpu_be,
  input  logic [31:0] cpu_wdata,
  input  logic        fill_we,
  input  logic        fill_last,
  input  logic [$clog2(WORDS)-1:0] fill_wsel,
  input  logic [31:0] fill_data
);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned OW    = $clog2(WORDS);
  localparam int unsigned TAG_W = 32 - IW - OW - 2;

  logic [IW-1:0]    idx;
  logic [OW-1:0]    wo;
  logic [TAG_W-1:0] tag, stored_tag;
  logic             valid;
  logic [31:0]      data [LINES][WORDS];

  assign idx = addr[OW+2 +: IW];
  assign wo  = addr[2 +: OW];
  assign tag = addr[31 -: TAG_W];

  tag_cache #(.LINES(LINES), .TAG_W(TAG_W), .HAS_DIRTY(1'b1)) u_tags (
    .clk, .rst, .invalidate(1'b0), .idx,
    .tag_o(stored_tag), .valid_o(valid), .dirty_o(dirty),
    .we(fill_last || (cpu_we && hit)), .tag_i(tag), .valid_i(1'b1),
    .dirty_i(!fill_last));

  assign hit        = valid && (stored_tag == tag);
  assign victim_tag = stored_tag;
  assign rdata      = data[idx][wo];
  assign line_word  = data[idx][fill_wsel];

  always_ff @(posedge clk) begin
    if (fill_we) begin
      data[idx][fill_wsel] <= fill_data;
    end else if (cpu_we && hit) begin
      for (int b = 0; b < 4; b++)
        if (cpu_be[b]) data[idx][wo][8*b +: 8] <= cpu_wdata[8*b +: 8];
    end
  end
endmodule
