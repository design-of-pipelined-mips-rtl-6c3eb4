// bht: branch history table of ROWS two-bit saturating counters. Port R
// (fetch stage) looks up the counter selected by rd_pc[IW+1:2] and predicts
// "taken" when the counter is 2 or 3. Port W (decode stage, where the branch
// is resolved) moves the counter selected by wr_pc one step towards the
// outcome when wr_en is high: up on taken, down on not taken, saturating at
// 0 and 3. All counters reset to 1 (weakly not taken). Read is combinational,
// update on the rising edge. The 64 rows of 2-bit counters follow the
// document; the index bits and reset value are this design's choice.
module bht #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned CW   = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rd_pc,
  output logic        predict,
  input  logic        wr_en,
  input  logic [31:0] wr_pc,
  input  logic        taken
);
  localparam int unsigned IW = $clog2(ROWS);
  localparam logic [CW-1:0] CMAX = '1;
  localparam logic [CW-1:0] CINIT = CW'(2**(CW-1) - 1);
  logic [CW-1:0] cnt [ROWS];
  logic [IW-1:0] ri, wi;

  assign ri      = rd_pc[IW+1:2];
  assign wi      = wr_pc[IW+1:2];
  assign predict = cnt[ri][CW-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ROWS; i++) cnt[i] <= CINIT;
    end else if (wr_en) begin
      if (taken && cnt[wi] != CMAX)      cnt[wi] <= cnt[wi] + 1'b1;
      else if (!taken && cnt[wi] != '0)  cnt[wi] <= cnt[wi] - 1'b1;
    end
  end
endmodule
