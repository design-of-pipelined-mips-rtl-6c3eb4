// mips_top: the complete design. Part 1 is the pipelined MIPS processor
// with its memory hierarchy: mips_core fetches through a two-way
// set-associative instruction cache (icache + icache_ctrl) and loads and
// stores through a direct-mapped write-back data cache (dcache +
// dcache_ctrl); both controllers fill lines word by word from a shared
// dual-port main memory with an access delay, and the core stalls while a
// cache is busy. ic_enable and ic_invalidate switch the instruction cache
// off (uncached fetches) and clear its valid bits. The ld_* port loads and
// inspects main memory; dbg_reg_* reads a core register.
// Part 2 stands beside it with its own ports: the ALU whose 32-bit result is
// written into the eight-BRAM register bank (bank_*), and the IEEE-754
// double-precision adder (fp_*). The document proposes both parts but does
// not show how the double-precision unit connects to the processor, so they
// are not wired together here. All cache and memory sizes are the defaults
// of the submodules.
module mips_top (
  input  logic        clk,
  input  logic        rst,
  input  logic        ic_enable,
  input  logic        ic_invalidate,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_wdata,
  output logic [31:0] ld_rdata,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  // ALU + BRAM register bank
  input  logic [7:0]        bank_a,
  input  logic [7:0]        bank_b,
  input  logic [3:0]        bank_alu_sel,
  input  logic [7:0][5:0]   bank_addr,
  input  logic [7:0]        bank_we,
  input  logic [3:0]        bank_msel,
  output logic [31:0]       bank_alu_y,
  output logic [7:0][31:0]  bank_dout,
  output logic [3:0][31:0]  bank_o,
  // double-precision adder
  input  logic [63:0] fp_a,
  input  logic [63:0] fp_b,
  input  logic        fp_sub,
  output logic [63:0] fp_s,
  output logic        fp_c
);
  // core <-> caches
  logic [31:0] pcF, instrF, daddr, dwdata, drdata;
  logic [3:0]  dbe;
  logic        dre, dwe, icache_stall, dcache_stall;

  // instruction side
  logic        ic_hit, ic_use_bypass, ic_fill_we, ic_fill_last, im_re, im_rst_dly, im_rdy;
  logic [1:0]  ic_wsel;
  logic [31:0] ic_rdata, ic_bypass_data, im_addr, im_rdata;

  // data side
  logic        dc_hit, dc_dirty, dc_cpu_we, dc_fill_we, dc_fill_last;
  logic        dm_re, dm_we, dm_rst_dly, dm_rdy, dc_addr_sel;
  logic [1:0]  dc_wsel;
  logic [25:0] dc_victim_tag;
  logic [31:0] dc_line_word, dm_addr, dm_rdata;

  mips_core u_core (
    .clk, .rst, .pcF, .instrF, .icache_stall,
    .daddr, .dwdata, .dbe, .dre, .dwe, .drdata, .dcache_stall,
    .dbg_reg_addr, .dbg_reg_data);

  icache u_icache (
    .clk, .rst, .invalidate(ic_invalidate), .addr(pcF), .touch(!icache_stall),
    .hit(ic_hit), .rdata(ic_rdata),
    .fill_we(ic_fill_we), .fill_last(ic_fill_last), .fill_wsel(ic_wsel), .fill_data(im_rdata));

  icache_ctrl u_icache_ctrl (
    .clk, .rst, .req(1'b1), .enable(ic_enable), .hit(ic_hit), .addr(pcF),
    .stall(icache_stall), .use_bypass(ic_use_bypass), .bypass_data(ic_bypass_data),
    .fill_we(ic_fill_we), .fill_last(ic_fill_last), .wsel(ic_wsel),
    .mem_re(im_re), .mem_rst_dly(im_rst_dly), .mem_addr(im_addr),
    .mem_rdata(im_rdata), .mem_rdy(im_rdy));

  assign instrF = ic_use_bypass ? ic_bypass_data : ic_rdata;

  dcache u_dcache (
    .clk, .rst, .addr(daddr), .hit(dc_hit), .dirty(dc_dirty), .victim_tag(dc_victim_tag),
    .rdata(drdata), .line_word(dc_line_word),
    .cpu_we(dc_cpu_we), .cpu_be(dbe), .cpu_wdata(dwdata),
    .fill_we(dc_fill_we), .fill_last(dc_fill_last), .fill_wsel(dc_wsel), .fill_data(dm_rdata));

  dcache_ctrl u_dcache_ctrl (
    .clk, .rst, .re(dre), .we(dwe), .hit(dc_hit), .dirty(dc_dirty), .mem_rdy(dm_rdy),
    .stall(dcache_stall), .cpu_we(dc_cpu_we), .fill_we(dc_fill_we), .fill_last(dc_fill_last),
    .wsel(dc_wsel), .mem_re(dm_re), .mem_we(dm_we), .mem_rst_dly(dm_rst_dly),
    .addr_sel(dc_addr_sel));

  // write-back address: stored tag & index & word; fill address: CPU tag & index & word
  assign dm_addr = dc_addr_sel ? {dc_victim_tag, daddr[5:4], dc_wsel, 2'b00}
                               : {daddr[31:4], dc_wsel, 2'b00};

  main_memory u_mem (
    .clk, .rst,
    .i_addr(im_addr), .i_re(im_re), .i_rst_dly(im_rst_dly), .i_rdata(im_rdata), .i_rdy(im_rdy),
    .d_addr(dm_addr), .d_re(dm_re), .d_we(dm_we), .d_rst_dly(dm_rst_dly),
    .d_wdata(dc_line_word), .d_rdata(dm_rdata), .d_rdy(dm_rdy),
    .ld_we, .ld_addr, .ld_wdata, .ld_rdata);

  // Part 2: ALU + BRAM register bank, double-precision adder
  alu_reg_bank u_bank (
    .clk, .a(bank_a), .b(bank_b), .alu_sel(bank_alu_sel), .addr(bank_addr), .we(bank_we),
    .msel(bank_msel), .alu_y(bank_alu_y), .dout(bank_dout), .o(bank_o));

  fp_add_dp u_fp (.a(fp_a), .b(fp_b), .sub(fp_sub), .s(fp_s), .c(fp_c));
endmodule
