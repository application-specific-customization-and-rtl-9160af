// smp_pkg: types, constants and helper functions shared by the soft
// multiprocessor.
//
// Holds the decoded-operation enumeration (one entry per supported MIPS
// instruction, which is also the bit index in an instruction-subset mask),
// the decoded-instruction struct handed from decode to execute, the
// inter-processor link descriptor used by the top level to build a mesh or a
// point-to-point topology, the memory map of the FIFO ports, and constant
// functions that encode MIPS instructions (used to build programs and tables).
//
// The MIPS encodings are the standard MIPS-I ones. Which instructions are in
// the subset, the FIFO address window, the link descriptor and the mesh port
// numbering are this design's own choices.
package smp_pkg;

  // ---------------------------------------------------------------- ISA ----
  // Supported operations. ADD/SUB/ADDI decode to ADDU/SUBU/ADDIU: there are
  // no overflow exceptions in this processor.
  typedef enum logic [5:0] {
    OP_ADDU, OP_SUBU, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
    OP_SLL, OP_SRL, OP_SRA, OP_SLLV, OP_SRLV, OP_SRAV,
    OP_JR, OP_JALR, OP_MULT, OP_MULTU, OP_MFHI, OP_MFLO,
    OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI,
    OP_LW, OP_SW,
    OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_BLTZ, OP_BGEZ,
    OP_J, OP_JAL,
    OP_INVALID
  } op_e;

  localparam int unsigned NUM_OPS = 37;          // OP_ADDU .. OP_JAL
  typedef logic [NUM_OPS-1:0] isa_mask_t;        // bit i enables op_e'(i)
  localparam isa_mask_t ISA_ALL = '1;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } br_e;

  // Execute-stage source of the result written back.
  typedef enum logic [1:0] {
    RES_ALU, RES_LINK, RES_HI, RES_LO
  } res_e;

  typedef struct packed {
    op_e         op;
    alu_op_e     alu_op;
    logic        a_shamt;   // ALU operand A is the shamt field, not rs
    logic        b_imm;     // ALU operand B is the immediate, not rt
    logic [31:0] imm;       // extended immediate (sign or zero)
    logic [4:0]  shamt;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  wa;        // destination register (0 = none)
    logic        we;
    res_e        res;
    logic        load;
    logic        store;
    br_e         br;
    logic        jump;      // J / JAL (target from instr_index)
    logic        jreg;      // JR / JALR (target from rs)
    logic [25:0] jidx;
    logic        mul;
    logic        mul_signed;
  } dec_t;

  // ----------------------------------------------------------- memory map --
  // Word addresses with bit 31 set select a FIFO port: the port number is
  // address bits [2 +: PORT_BITS]. A load pops the input FIFO of that port, a
  // store pushes the output FIFO of that port. All other addresses go to the
  // local data memory.
  localparam int unsigned PORT_BITS = 4;
  localparam int unsigned MAX_PORTS = 1 << PORT_BITS;
  localparam logic [31:0] FIFO_BASE = 32'h8000_0000;

  // Mesh port numbers.
  localparam int unsigned PORT_N   = 0;
  localparam int unsigned PORT_S   = 1;
  localparam int unsigned PORT_E   = 2;
  localparam int unsigned PORT_W   = 3;
  localparam int unsigned PORT_EXT = 4;   // mesh port reserved for host I/O
  // In a point-to-point table the natural numbering is by peer: input port k
  // carries data from processor k, output port k data to processor k, and a
  // processor's host port is its own number (it never links to itself).

  // --------------------------------------------------------------- links ---
  // One unidirectional FIFO: producer (processor, output port) to consumer
  // (processor, input port). Processor number EXT means the host side of the
  // top level; the port number then selects the external stream.
  localparam logic [7:0] EXT = 8'hFF;
  localparam int unsigned MAX_LINKS = 64;

  typedef struct packed {
    logic [7:0] src;
    logic [7:0] sport;
    logic [7:0] dst;
    logic [7:0] dport;
  } link_t;

  typedef link_t [MAX_LINKS-1:0] link_table_t;

  function automatic link_t mk_link(int src, int sport, int dst, int dport);
    link_t l;
    l.src   = 8'(src);
    l.sport = 8'(sport);
    l.dst   = 8'(dst);
    l.dport = 8'(dport);
    return l;
  endfunction

  // Number of links of an X x Y mesh plus one host input and one host output.
  function automatic int mesh_nlinks(int x, int y);
    return 2 * (x * (y - 1) + y * (x - 1)) + 2;
  endfunction

  // Link table of an X x Y mesh. Processor p sits at column p % X, row p / X
  // (row 0 on top). Every pair of neighbours is joined by two FIFOs, one per
  // direction; a FIFO leaving through port N arrives at the neighbour's port S
  // and so on. The host input feeds processor in_proc, port PORT_EXT;
  // processor out_proc, port PORT_EXT, feeds the host output.
  function automatic link_table_t mesh_table(int x, int y, int in_proc, int out_proc);
    link_table_t t;
    int n;
    t = '0;
    n = 0;
    for (int p = 0; p < x * y; p++) begin
      int px, py;
      px = p % x;
      py = p / x;
      if (py > 0)     begin t[n] = mk_link(p, PORT_N, p - x, PORT_S); n++; end
      if (py < y - 1) begin t[n] = mk_link(p, PORT_S, p + x, PORT_N); n++; end
      if (px < x - 1) begin t[n] = mk_link(p, PORT_E, p + 1, PORT_W); n++; end
      if (px > 0)     begin t[n] = mk_link(p, PORT_W, p - 1, PORT_E); n++; end
    end
    t[n] = mk_link(int'(EXT), 0, in_proc, PORT_EXT); n++;
    t[n] = mk_link(out_proc, PORT_EXT, int'(EXT), 0);
    return t;
  endfunction

  // ------------------------------------------------------ instruction words --
  function automatic logic [31:0] enc_r(int rs, int rt, int rd, int sh, logic [5:0] funct);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), funct};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] opc, int rs, int rt, int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] i_nop();                       return 32'h0; endfunction
  function automatic logic [31:0] i_addu(int d, int s, int t);  return enc_r(s, t, d, 0, 6'h21); endfunction
  function automatic logic [31:0] i_subu(int d, int s, int t);  return enc_r(s, t, d, 0, 6'h23); endfunction
  function automatic logic [31:0] i_and (int d, int s, int t);  return enc_r(s, t, d, 0, 6'h24); endfunction
  function automatic logic [31:0] i_or  (int d, int s, int t);  return enc_r(s, t, d, 0, 6'h25); endfunction
  function automatic logic [31:0] i_xor (int d, int s, int t);  return enc_r(s, t, d, 0, 6'h26); endfunction
  function automatic logic [31:0] i_nor (int d, int s, int t);  return enc_r(s, t, d, 0, 6'h27); endfunction
  function automatic logic [31:0] i_slt (int d, int s, int t);  return enc_r(s, t, d, 0, 6'h2a); endfunction
  function automatic logic [31:0] i_sltu(int d, int s, int t);  return enc_r(s, t, d, 0, 6'h2b); endfunction
  function automatic logic [31:0] i_sll (int d, int t, int sh); return enc_r(0, t, d, sh, 6'h00); endfunction
  function automatic logic [31:0] i_srl (int d, int t, int sh); return enc_r(0, t, d, sh, 6'h02); endfunction
  function automatic logic [31:0] i_sra (int d, int t, int sh); return enc_r(0, t, d, sh, 6'h03); endfunction
  function automatic logic [31:0] i_sllv(int d, int t, int s);  return enc_r(s, t, d, 0, 6'h04); endfunction
  function automatic logic [31:0] i_srlv(int d, int t, int s);  return enc_r(s, t, d, 0, 6'h06); endfunction
  function automatic logic [31:0] i_srav(int d, int t, int s);  return enc_r(s, t, d, 0, 6'h07); endfunction
  function automatic logic [31:0] i_jr  (int s);                return enc_r(s, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] i_jalr(int d, int s);         return enc_r(s, 0, d, 0, 6'h09); endfunction
  function automatic logic [31:0] i_mfhi(int d);                return enc_r(0, 0, d, 0, 6'h10); endfunction
  function automatic logic [31:0] i_mflo(int d);                return enc_r(0, 0, d, 0, 6'h12); endfunction
  function automatic logic [31:0] i_mult (int s, int t);        return enc_r(s, t, 0, 0, 6'h18); endfunction
  function automatic logic [31:0] i_multu(int s, int t);        return enc_r(s, t, 0, 0, 6'h19); endfunction
  function automatic logic [31:0] i_addiu(int t, int s, int imm); return enc_i(6'h09, s, t, imm); endfunction
  function automatic logic [31:0] i_slti (int t, int s, int imm); return enc_i(6'h0a, s, t, imm); endfunction
  function automatic logic [31:0] i_sltiu(int t, int s, int imm); return enc_i(6'h0b, s, t, imm); endfunction
  function automatic logic [31:0] i_andi (int t, int s, int imm); return enc_i(6'h0c, s, t, imm); endfunction
  function automatic logic [31:0] i_ori  (int t, int s, int imm); return enc_i(6'h0d, s, t, imm); endfunction
  function automatic logic [31:0] i_xori (int t, int s, int imm); return enc_i(6'h0e, s, t, imm); endfunction
  function automatic logic [31:0] i_lui  (int t, int imm);        return enc_i(6'h0f, 0, t, imm); endfunction
  function automatic logic [31:0] i_lw   (int t, int s, int off); return enc_i(6'h23, s, t, off); endfunction
  function automatic logic [31:0] i_sw   (int t, int s, int off); return enc_i(6'h2b, s, t, off); endfunction
  // Branch offsets are in instructions, relative to the delay slot.
  function automatic logic [31:0] i_beq (int s, int t, int off); return enc_i(6'h04, s, t, off); endfunction
  function automatic logic [31:0] i_bne (int s, int t, int off); return enc_i(6'h05, s, t, off); endfunction
  function automatic logic [31:0] i_blez(int s, int off);        return enc_i(6'h06, s, 0, off); endfunction
  function automatic logic [31:0] i_bgtz(int s, int off);        return enc_i(6'h07, s, 0, off); endfunction
  function automatic logic [31:0] i_bltz(int s, int off);        return enc_i(6'h01, s, 0, off); endfunction
  function automatic logic [31:0] i_bgez(int s, int off);        return enc_i(6'h01, s, 1, off); endfunction
  function automatic logic [31:0] i_j   (int word_addr);         return {6'h02, 26'(word_addr)}; endfunction
  function automatic logic [31:0] i_jal (int word_addr);         return {6'h03, 26'(word_addr)}; endfunction

  // Load from / store to FIFO port `port` using base register `s`, which
  // must hold FIFO_BASE.
  function automatic logic [31:0] i_fifo_rd(int t, int s, int port); return i_lw(t, s, port * 4); endfunction
  function automatic logic [31:0] i_fifo_wr(int t, int s, int port); return i_sw(t, s, port * 4); endfunction

endpackage
