// icache_ctrl: the instruction-cache controller FSM. In IDLE it watches the
// fetch request: a hit needs nothing, a miss (with the cache enabled) goes
// to FILL, which reads the 4 words of the line from main memory one after
// another (wsel 0..3, waiting for mem_rdy on each) and writes each into the
// victim way; the last word also writes the tag (fill_last) and the FSM
// returns to IDLE, where the fetch now hits. With the cache disabled every
// fetch goes to BYPASS: one uncached word read from the fetch address,
// held in a register and delivered in BDONE (use_bypass). stall is high
// whenever the fetch cannot complete this cycle. rst_dly restarts the
// memory's access-delay counter at the start of each transfer. Port names
// (re, wsel, rdy, rst_dly) follow the document's figure; the states are
// this design's choice. mem_addr is the fetch address with the word bits
// replaced by wsel during a fill, so most of its bits come straight from
// addr.
module icache_ctrl (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        enable,
  input  logic        hit,
  input  logic [31:0] addr,
  output logic        stall,
  output logic        use_bypass,
  output logic [31:0] bypass_data,
  output logic        fill_we,
  output logic        fill_last,
  output logic [1:0]  wsel,
  output logic        mem_re,
  output logic        mem_rst_dly,
  output logic [31:0] mem_addr,
  input  logic [31:0] mem_rdata,
  input  logic        mem_rdy
);
  typedef enum logic [1:0] { IDLE, FILL, BYPASS, BDONE } state_t;
  state_t state, state_n;
  logic [1:0] wcnt;

  always_comb begin
    state_n     = state;
    stall       = 1'b0;
    use_bypass  = 1'b0;
    fill_we     = 1'b0;
    fill_last   = 1'b0;
    mem_re      = 1'b0;
    mem_rst_dly = 1'b0;
    mem_addr    = {addr[31:4], wcnt, 2'b00};
    unique case (state)
      IDLE: if (req) begin
        if (!enable) begin
          stall = 1'b1; mem_rst_dly = 1'b1; state_n = BYPASS;
        end else if (!hit) begin
          stall = 1'b1; mem_rst_dly = 1'b1; state_n = FILL;
        end
      end
      FILL: begin
        stall  = 1'b1;
        mem_re = 1'b1;
        if (mem_rdy) begin
          fill_we = 1'b1;
          if (wcnt == 2'd3) begin fill_last = 1'b1; state_n = IDLE; end
        end
      end
      BYPASS: begin
        stall    = 1'b1;
        mem_re   = 1'b1;
        mem_addr = addr;
        if (mem_rdy) state_n = BDONE;
      end
      BDONE: begin
        use_bypass = 1'b1;
        state_n    = IDLE;
      end
      default: state_n = IDLE;
    endcase
  end
  assign wsel = wcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      wcnt  <= '0;
      bypass_data <= '0;
    end else begin
      state <= state_n;
      if (state == IDLE) wcnt <= '0;
      else if (state == FILL && mem_rdy) wcnt <= wcnt + 2'd1;
      if (state == BYPASS && mem_rdy) bypass_data <= mem_rdata;
    end
  end

  // Handshake rules: fetch is held while the memory is busy, every
  // transfer starts with a delay-counter restart, the tag is written with
  // a data word, and an uncached word is delivered right after it arrives.
  a_held:     assert property (@(posedge clk) disable iff (rst) mem_re |-> stall);
  a_start:    assert property (@(posedge clk) disable iff (rst)
                               (state == IDLE && state_n != IDLE) |-> mem_rst_dly);
  a_tag_word: assert property (@(posedge clk) disable iff (rst) fill_last |-> fill_we);
  a_deliver:  assert property (@(posedge clk) disable iff (rst)
                               (state == BYPASS && mem_rdy) |=> use_bypass && !stall);
endmodule
