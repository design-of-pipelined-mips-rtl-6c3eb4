// pc_reg: the program counter of the fetch stage and its +4 incrementer.
// On reset the PC returns to RESET_PC (zero, as the document's PC resets
// the incrementer to 0000); otherwise it loads pc_next on each rising edge
// while en is high and holds its value while en is low (pipeline stall).
// The document builds the hold with an S-R latch; here it is an
// edge-triggered register with an enable, which is this design's choice.
module pc_reg #(parameter logic [31:0] RESET_PC = 32'h0000_0000) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] pc_next,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  always_ff @(posedge clk) begin
    if (rst)     pc <= RESET_PC;
    else if (en) pc <= pc_next;
  end
  assign pc_plus4 = pc + 32'd4;
endmodule
