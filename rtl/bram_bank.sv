// bram_bank: the register bank of eight block RAMs. Every BRAM has its own
// address and write enable and all of them take the same write data (the
// ALU result), so one result can be stored at up to eight addresses in one
// cycle. Reads are synchronous like FPGA block RAM: dout[i] shows the word
// at the address presented on the previous rising edge (write-first). The
// eight outputs are paired into NMUX two-input multiplexers to cut the
// number of data lines: o[k] = msel[k] ? dout[2k+1] : dout[2k]. Eight
// BRAMs, 6-bit addresses, 32-bit words and four muxes follow the document;
// the pairing of BRAMs onto muxes and the read timing are this design's
// choice. BRAM contents are not reset.
module bram_bank #(
  parameter int unsigned NBRAM = 8,
  parameter int unsigned AW    = 6,
  parameter int unsigned DW    = 32,
  parameter int unsigned NMUX  = NBRAM / 2
) (
  input  logic                      clk,
  input  logic [NBRAM-1:0][AW-1:0]  addr,
  input  logic [NBRAM-1:0]          we,
  input  logic [DW-1:0]             wdata,
  output logic [NBRAM-1:0][DW-1:0]  dout,
  input  logic [NMUX-1:0]           msel,
  output logic [NMUX-1:0][DW-1:0]   o
);
  for (genvar i = 0; i < NBRAM; i++) begin : g_bram
    logic [DW-1:0] mem [2**AW];
    always_ff @(posedge clk) begin
      if (we[i]) begin
        mem[addr[i]] <= wdata;
        dout[i]      <= wdata;
      end else begin
        dout[i]      <= mem[addr[i]];
      end
    end
  end

  for (genvar k = 0; k < NMUX; k++) begin : g_mux
    assign o[k] = msel[k] ? dout[2*k+1] : dout[2*k];
  end
endmodule
