// mips_ref_pkg: test-bench support for the MIPS core. It holds small
// instruction encoders (rtype, itype, jtype), the test program used by the
// end-to-end tests, and an instruction-level reference model (class
// mips_ref) that executes the same program one instruction at a time with
// no pipeline, so that the register file, Hi/Lo and memory of the pipelined
// design can be compared with it. Memory is 64 little-endian words
// (addresses wrap at 256 bytes); there is no branch delay slot.
package mips_ref_pkg;

  function automatic logic [31:0] rtype(input int rs, rt, rd, sh, fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] itype(input int op, rs, rt, imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] jtype(input int op, int target_byte_addr);
    return {6'(op), 26'(target_byte_addr >> 2)};
  endfunction

  localparam logic [31:0] HALT = 32'h1000_FFFF;   // beq $0,$0,-1
  localparam int          HALT_PC = 32'h7C;

  // The test program: code 0x00..0x7C, data 0x80..0xDF, subroutine 0xE0..0xF0.
  function automatic void load_program(ref logic [31:0] m [64]);
    for (int i = 0; i < 64; i++) m[i] = 32'h0;
    m['h00/4] = itype('h09, 0, 1, 'h80);          // addiu $1,$0,0x80
    m['h04/4] = itype('h09, 0, 2, 5);             // addiu $2,$0,5
    m['h08/4] = itype('h09, 0, 3, 0);             // addiu $3,$0,0
    m['h0C/4] = rtype(3, 2, 3, 0, 'h21);          // loop: addu $3,$3,$2
    m['h10/4] = itype('h2B, 1, 3, 0);             // sw $3,0($1)
    m['h14/4] = itype('h09, 2, 2, -1);            // addiu $2,$2,-1
    m['h18/4] = itype('h05, 2, 0, -4);            // bne $2,$0,loop
    m['h1C/4] = itype('h23, 1, 4, 0);             // lw $4,0($1)
    m['h20/4] = rtype(4, 4, 5, 0, 'h21);          // addu $5,$4,$4   (load-use)
    m['h24/4] = rtype(5, 4, 0, 0, 'h18);          // mult $5,$4
    m['h28/4] = rtype(0, 0, 6, 0, 'h12);          // mflo $6
    m['h2C/4] = itype('h09, 0, 7, -7);            // addiu $7,$0,-7
    m['h30/4] = rtype(6, 7, 0, 0, 'h1A);          // div $6,$7
    m['h34/4] = rtype(0, 0, 8, 0, 'h10);          // mfhi $8
    m['h38/4] = rtype(0, 0, 9, 0, 'h12);          // mflo $9
    m['h3C/4] = itype('h28, 1, 9, 'h41);          // sb $9,0x41($1)   (dirty conflict miss)
    m['h40/4] = itype('h24, 1, 10, 'h41);         // lbu $10,0x41($1)
    m['h44/4] = itype('h20, 1, 11, 'h41);         // lb $11,0x41($1)
    m['h48/4] = itype('h0F, 0, 12, 'h1234);       // lui $12,0x1234
    m['h4C/4] = itype('h0D, 12, 12, 'h5678);      // ori $12,$12,0x5678
    m['h50/4] = itype('h29, 1, 12, 'h22);         // sh $12,0x22($1)
    m['h54/4] = itype('h21, 1, 13, 'h22);         // lh $13,0x22($1)
    m['h58/4] = itype('h23, 1, 14, 0);            // lw $14,0($1)     (line was written back)
    m['h5C/4] = jtype('h03, 'hE0);                // jal func
    m['h60/4] = rtype(0, 15, 16, 3, 'h00);        // sll $16,$15,3
    m['h64/4] = rtype(9, 0, 17, 0, 'h2A);         // slt $17,$9,$0
    m['h68/4] = rtype(9, 0, 18, 0, 'h2B);         // sltu $18,$9,$0
    m['h6C/4] = rtype(12, 14, 19, 0, 'h26);       // xor $19,$12,$14
    m['h70/4] = rtype(0, 9, 20, 2, 'h03);         // sra $20,$9,2
    m['h74/4] = rtype(7, 12, 21, 0, 'h06);        // srlv $21,$12,$7
    m['h78/4] = rtype(8, 0, 22, 0, 'h27);         // nor $22,$8,$0
    m['h7C/4] = HALT;                             // halt: beq $0,$0,-1
    m['h80/4] = 32'h0000_0000;                    // data
    m['hA0/4] = 32'hCAFE_F00D;
    m['hC0/4] = 32'h1111_2222;
    m['hE0/4] = itype('h09, 0, 15, 3);            // func: addiu $15,$0,3
    m['hE4/4] = rtype(15, 31, 15, 0, 'h21);       // addu $15,$15,$31
    m['hE8/4] = rtype(15, 0, 0, 0, 'h11);         // mthi $15
    m['hEC/4] = rtype(0, 0, 23, 0, 'h10);         // mfhi $23
    m['hF0/4] = rtype(31, 0, 0, 0, 'h08);         // jr $31
  endfunction

  class mips_ref;
    logic [31:0] r [32];
    logic [31:0] hi, lo, pc;
    logic [31:0] mem [64];
    int          steps;

    function new();
      for (int i = 0; i < 32; i++) r[i] = 0;
      hi = 0; lo = 0; pc = 0; steps = 0;
    endfunction

    function automatic logic [31:0] rd_word(input logic [31:0] a);
      return mem[a[7:2]];
    endfunction

    function automatic void step();
      logic [31:0] in, s, t, imm_s, imm_z, npc, a, w;
      logic [5:0] op, fn;
      int rs, rt, rd, sh;
      in = mem[pc[7:2]];
      op = in[31:26]; fn = in[5:0];
      rs = in[25:21]; rt = in[20:16]; rd = in[15:11]; sh = in[10:6];
      s = r[rs]; t = r[rt];
      imm_s = {{16{in[15]}}, in[15:0]}; imm_z = {16'h0, in[15:0]};
      npc = pc + 4;
      a = s + imm_s;
      case (op)
        'h00: case (fn)
          'h00: r[rd] = t << sh;
          'h02: r[rd] = t >> sh;
          'h03: r[rd] = $unsigned($signed(t) >>> sh);
          'h04: r[rd] = t << s[4:0];
          'h06: r[rd] = t >> s[4:0];
          'h07: r[rd] = $unsigned($signed(t) >>> s[4:0]);
          'h08: npc = s;
          'h09: begin r[rd] = pc + 4; npc = s; end
          'h10: r[rd] = hi;
          'h11: hi = s;
          'h12: r[rd] = lo;
          'h13: lo = s;
          'h18: {hi, lo} = longint'(int'(s)) * longint'(int'(t));
          'h19: {hi, lo} = {32'h0, s} * {32'h0, t};
          'h1A: begin lo = int'(s) / int'(t); hi = int'(s) % int'(t); end
          'h1B: begin lo = s / t; hi = s % t; end
          'h20, 'h21: r[rd] = s + t;
          'h22, 'h23: r[rd] = s - t;
          'h24: r[rd] = s & t;
          'h25: r[rd] = s | t;
          'h26: r[rd] = s ^ t;
          'h27: r[rd] = ~(s | t);
          'h2A: r[rd] = (int'(s) < int'(t)) ? 1 : 0;
          'h2B: r[rd] = (s < t) ? 1 : 0;
          default: ;
        endcase
        'h02: npc = {npc[31:28], in[25:0], 2'b00};
        'h03: begin r[31] = pc + 4; npc = {npc[31:28], in[25:0], 2'b00}; end
        'h04: if (s == t) npc = pc + 4 + (imm_s << 2);
        'h05: if (s != t) npc = pc + 4 + (imm_s << 2);
        'h08, 'h09: r[rt] = s + imm_s;
        'h0A: r[rt] = (int'(s) < int'(imm_s)) ? 1 : 0;
        'h0B: r[rt] = (s < imm_s) ? 1 : 0;
        'h0C: r[rt] = s & imm_z;
        'h0D: r[rt] = s | imm_z;
        'h0E: r[rt] = s ^ imm_z;
        'h0F: r[rt] = {in[15:0], 16'h0};
        'h20: begin w = rd_word(a); r[rt] = {{24{w[8*a[1:0]+7]}}, w[8*a[1:0] +: 8]}; end
        'h24: begin w = rd_word(a); r[rt] = {24'h0, w[8*a[1:0] +: 8]}; end
        'h21: begin w = rd_word(a); r[rt] = {{16{w[16*a[1]+15]}}, w[16*a[1] +: 16]}; end
        'h25: begin w = rd_word(a); r[rt] = {16'h0, w[16*a[1] +: 16]}; end
        'h23: r[rt] = rd_word(a);
        'h28: mem[a[7:2]][8*a[1:0] +: 8] = t[7:0];
        'h29: mem[a[7:2]][16*a[1] +: 16] = t[15:0];
        'h2B: mem[a[7:2]] = t;
        default: ;
      endcase
      r[0] = 0;
      pc = npc;
      steps++;
    endfunction

    // run until the halt instruction is reached
    function automatic void run(input int max_steps);
      while (mem[pc[7:2]] != HALT && steps < max_steps) step();
    endfunction
  endclass
endpackage
