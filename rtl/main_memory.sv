// main_memory: the word-organised main memory shared by the two caches,
// LINES lines of 4 words (addresses wrap modulo its size). It has an
// instruction port (read only) and a data port (read/write), each with an
// access-delay counter: while re or we is held, the counter runs and rdy
// rises for one cycle every LATENCY cycles; a read returns rdata
// (combinational from the address) and a write takes effect in that rdy
// cycle. rst_dly clears a port's counter so a new transfer starts a full
// delay. A third port (ld_*) writes and reads words without delay, for
// loading programs and inspecting results. The two cache-side ports and
// their signals (address, data out/in, rdy, wsel via the address, rst_dly)
// follow the document's figure, as do the 16 lines; the delay value is
// this design's choice. Contents are not reset.
module main_memory #(
  parameter int unsigned LINES   = 16,
  parameter int unsigned LATENCY = 4
) (
  input  logic        clk,
  input  logic        rst,
  // instruction side
  input  logic [31:0] i_addr,
  input  logic        i_re,
  input  logic        i_rst_dly,
  output logic [31:0] i_rdata,
  output logic        i_rdy,
  // data side
  input  logic [31:0] d_addr,
  input  logic        d_re,
  input  logic        d_we,
  input  logic        d_rst_dly,
  input  logic [31:0] d_wdata,
  output logic [31:0] d_rdata,
  output logic        d_rdy,
  // load / inspect port
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_wdata,
  output logic [31:0] ld_rdata
);
  localparam int unsigned NW = LINES * 4;
  localparam int unsigned AW = $clog2(NW);
  localparam int unsigned CW = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  logic [31:0]   mem [NW];
  logic [CW-1:0] icnt, dcnt;

  assign i_rdy = i_re && !i_rst_dly && (icnt == CW'(LATENCY - 1));
  assign d_rdy = (d_re || d_we) && !d_rst_dly && (dcnt == CW'(LATENCY - 1));

  always_ff @(posedge clk) begin
    if (rst || i_rst_dly || i_rdy || !i_re) icnt <= '0;
    else                                    icnt <= icnt + 1'b1;
    if (rst || d_rst_dly || d_rdy || !(d_re || d_we)) dcnt <= '0;
    else                                              dcnt <= dcnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (d_we && d_rdy) mem[d_addr[AW+1:2]] <= d_wdata;
    if (ld_we)         mem[ld_addr[AW+1:2]] <= ld_wdata;
  end

  assign i_rdata  = mem[i_addr[AW+1:2]];
  assign d_rdata  = mem[d_addr[AW+1:2]];
  assign ld_rdata = mem[ld_addr[AW+1:2]];
endmodule
