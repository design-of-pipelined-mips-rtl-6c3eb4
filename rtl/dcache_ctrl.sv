// dcache_ctrl: the data-cache controller FSM (write-back, write-allocate).
// In IDLE a load or store that hits completes in the same cycle (a store
// is passed on as cpu_we). On a miss it stalls the pipeline and goes to
// WRITEBACK if the indexed line is dirty, else straight to ALLOCATE.
// WRITEBACK writes the 4 words of the old line to main memory at the
// address built from the stored tag, the index and wsel ("Tag & I & 0",
// addr_sel = 1); ALLOCATE reads the 4 words of the new line (addr_sel = 0)
// and writes each into the cache (fill_we, fill_last with the tag). Each
// word waits for mem_rdy; rst_dly restarts the memory's delay counter when
// a transfer begins. Back in IDLE the access hits. The signal set (cache
// read/write, wsel, memrd, memwr, rst_dly, address select, mem_rdy, stall)
// follows the document's figure; the states are this design's choice.
module dcache_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       re,
  input  logic       we,
  input  logic       hit,
  input  logic       dirty,
  input  logic       mem_rdy,
  output logic       stall,
  output logic       cpu_we,
  output logic       fill_we,
  output logic       fill_last,
  output logic [1:0] wsel,
  output logic       mem_re,
  output logic       mem_we,
  output logic       mem_rst_dly,
  output logic       addr_sel
);
  typedef enum logic [1:0] { IDLE, WRITEBACK, ALLOCATE } state_t;
  state_t state, state_n;
  logic [1:0] wcnt;

  always_comb begin
    state_n     = state;
    stall       = 1'b0;
    cpu_we      = 1'b0;
    fill_we     = 1'b0;
    fill_last   = 1'b0;
    mem_re      = 1'b0;
    mem_we      = 1'b0;
    mem_rst_dly = 1'b0;
    addr_sel    = 1'b0;
    unique case (state)
      IDLE: if (re || we) begin
        if (hit) begin
          cpu_we = we;
        end else begin
          stall = 1'b1; mem_rst_dly = 1'b1;
          state_n = dirty ? WRITEBACK : ALLOCATE;
        end
      end
      WRITEBACK: begin
        stall = 1'b1; mem_we = 1'b1; addr_sel = 1'b1;
        if (mem_rdy && wcnt == 2'd3) state_n = ALLOCATE;
      end
      ALLOCATE: begin
        stall = 1'b1; mem_re = 1'b1;
        if (mem_rdy) begin
          fill_we = 1'b1;
          if (wcnt == 2'd3) begin fill_last = 1'b1; state_n = IDLE; end
        end
      end
      default: state_n = IDLE;
    endcase
  end
  assign wsel = wcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      wcnt  <= '0;
    end else begin
      state <= state_n;
      if (state == IDLE) wcnt <= '0;
      else if (mem_rdy) wcnt <= wcnt + 2'd1;
    end
  end

  // Handshake rules: the memory is never read and written at once, the
  // pipeline is held for as long as a transfer runs, every transfer starts
  // with a delay-counter restart, and the tag is written with a data word.
  a_one_dir:  assert property (@(posedge clk) disable iff (rst) !(mem_re && mem_we));
  a_held:     assert property (@(posedge clk) disable iff (rst) (mem_re || mem_we) |-> stall);
  a_start:    assert property (@(posedge clk) disable iff (rst)
                               (state == IDLE && state_n != IDLE) |-> mem_rst_dly);
  a_tag_word: assert property (@(posedge clk) disable iff (rst) fill_last |-> fill_we);
endmodule
