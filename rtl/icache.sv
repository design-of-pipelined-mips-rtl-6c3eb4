// icache: two-way set-associative instruction store. The address splits
// into tag (addr[31:4+IW]), set index (IW bits), word select (addr[3:2])
// and byte offset. Each way has a tag cache (tag + valid, no dirty bit) and
// a data array of SETS lines x WORDS 32-bit words; a comparator per way
// ANDed with its valid bit gives the way hit, the OR of both is hit, and a
// mux picks the word of the hitting way (rdata), all combinational. One MRU
// bit per set records the way used last; on a miss the controller fills the
// victim way: an invalid way if there is one, else the way that is not MRU.
// Fill port: fill_we writes fill_data into word fill_wsel of the victim line;
// fill_last also writes its tag, sets valid and makes it MRU. A hit with
// touch high makes the hitting way MRU. invalidate clears all valid bits.
// Two ways, the MRU column and the hit/mux structure follow the document's
// instruction-cache figure; 4 sets of 4-word lines give the document's 26
// tag bits. The victim rule is this design's choice.
module icache #(
  parameter int unsigned SETS  = 4,
  parameter int unsigned WORDS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        invalidate,
  input  logic [31:0] addr,
  input  logic        touch,
  output logic        hit,
  output logic [31:0] rdata,
  input  logic        fill_we,
  input  logic        fill_last,
  input  logic [$clog2(WORDS)-1:0] fill_wsel,
  input  logic [31:0] fill_data
);
  localparam int unsigned IW    = $clog2(SETS);
  localparam int unsigned OW    = $clog2(WORDS);
  localparam int unsigned TAG_W = 32 - IW - OW - 2;

  logic [IW-1:0]    idx;
  logic [OW-1:0]    wo;
  logic [TAG_W-1:0] tag;
  assign idx = addr[OW+2 +: IW];
  assign wo  = addr[2 +: OW];
  assign tag = addr[31 -: TAG_W];

  logic [1:0]       way_hit, way_valid;
  logic [TAG_W-1:0] way_tag [2];
  logic [31:0]      way_word [2];
  logic [SETS-1:0]  mru;
  logic             victim;

  assign victim = !way_valid[0] ? 1'b0 : !way_valid[1] ? 1'b1 : ~mru[idx];

  for (genvar w = 0; w < 2; w++) begin : g_way
    logic dirty_unused;
    logic [31:0] data [SETS][WORDS];
    tag_cache #(.LINES(SETS), .TAG_W(TAG_W), .HAS_DIRTY(1'b0)) u_tags (
      .clk, .rst, .invalidate, .idx,
      .tag_o(way_tag[w]), .valid_o(way_valid[w]), .dirty_o(dirty_unused),
      .we(fill_last && victim == w), .tag_i(tag), .valid_i(1'b1), .dirty_i(1'b0));
    always_ff @(posedge clk) begin
      if (fill_we && victim == w) data[idx][fill_wsel] <= fill_data;
    end
    assign way_word[w] = data[idx][wo];
    assign way_hit[w]  = way_valid[w] && (way_tag[w] == tag);
  end

  assign hit   = |way_hit;
  assign rdata = way_hit[1] ? way_word[1] : way_word[0];

  always_ff @(posedge clk) begin
    if (rst) mru <= '0;
    else if (fill_last)   mru[idx] <= victim;
    else if (touch && hit) mru[idx] <= way_hit[1];
  end
endmodule
