// tb_decoder: self-checking testbench for the instruction decoder.
// Encodes every supported instruction with random fields and checks the
// decoded operation, registers, write enable, immediate extension, ALU
// function, branch and jump controls. A second decoder built with a reduced
// instruction subset must turn every removed instruction into a no-effect
// OP_INVALID while still decoding the kept ones.
module tb_decoder;
  import smp_pkg::*;
  // Subset: drop MULT, MULTU, MFHI, MFLO, SRAV, NOR and BGTZ.
  localparam isa_mask_t SUB = ISA_ALL & ~((isa_mask_t'(1) << OP_MULT) | (isa_mask_t'(1) << OP_MULTU) |
                                           (isa_mask_t'(1) << OP_MFHI) | (isa_mask_t'(1) << OP_MFLO) |
                                           (isa_mask_t'(1) << OP_SRAV) | (isa_mask_t'(1) << OP_NOR)  |
                                           (isa_mask_t'(1) << OP_BGTZ));
  logic [31:0] instr;
  dec_t d, ds;
  int checks = 0, failures = 0;

  decoder #(.ISA_EN(ISA_ALL)) dut  (.instr(instr), .d(d));
  decoder #(.ISA_EN(SUB))     dut2 (.instr(instr), .d(ds));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  task automatic expect_op(logic [31:0] w, op_e op, int wa, bit b_imm, logic [31:0] imm, alu_op_e aop, br_e br);
    instr = w;
    #1;
    check(d.op == op, $sformatf("op %s got %s", op.name(), d.op.name()));
    check(d.wa == 5'(wa) && d.we == (wa != 0), "destination");
    check(d.rs == w[25:21] && d.rt == w[20:16], "sources");
    check(d.b_imm == b_imm, "operand B select");
    if (b_imm) check(d.imm == imm, "immediate");
    check(d.alu_op == aop, "alu op");
    check(d.br == br, "branch condition");
    check(d.load == (op == OP_LW) && d.store == (op == OP_SW), "load/store");
    check(d.jump == (op == OP_J || op == OP_JAL) && d.jreg == (op == OP_JR || op == OP_JALR), "jump");
    check(d.mul == (op == OP_MULT || op == OP_MULTU) && d.mul_signed == (op == OP_MULT), "multiply");
    check(d.a_shamt == (op == OP_SLL || op == OP_SRL || op == OP_SRA), "shamt select");
    if (SUB[op]) check(ds == d, "kept instruction decodes the same in the subset");
    else check(ds.op == OP_INVALID && !ds.we && !ds.load && !ds.store && !ds.mul &&
               ds.br == BR_NONE && !ds.jump && !ds.jreg, "removed instruction has no effect");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      int s, t, r, sh, im;
      logic [31:0] sx, zx;
      s = $urandom_range(0, 31); t = $urandom_range(0, 31); r = $urandom_range(0, 31);
      sh = $urandom_range(0, 31); im = $urandom_range(0, 65535);
      sx = {{16{im[15]}}, im[15:0]};
      zx = {16'h0, im[15:0]};
      expect_op(i_addu(r, s, t), OP_ADDU, r, 0, 0, ALU_ADD, BR_NONE);
      expect_op(enc_r(s, t, r, 0, 6'h20), OP_ADDU, r, 0, 0, ALU_ADD, BR_NONE);
      expect_op(i_subu(r, s, t), OP_SUBU, r, 0, 0, ALU_SUB, BR_NONE);
      expect_op(i_and(r, s, t),  OP_AND,  r, 0, 0, ALU_AND, BR_NONE);
      expect_op(i_or(r, s, t),   OP_OR,   r, 0, 0, ALU_OR,  BR_NONE);
      expect_op(i_xor(r, s, t),  OP_XOR,  r, 0, 0, ALU_XOR, BR_NONE);
      expect_op(i_nor(r, s, t),  OP_NOR,  r, 0, 0, ALU_NOR, BR_NONE);
      expect_op(i_slt(r, s, t),  OP_SLT,  r, 0, 0, ALU_SLT, BR_NONE);
      expect_op(i_sltu(r, s, t), OP_SLTU, r, 0, 0, ALU_SLTU, BR_NONE);
      expect_op(enc_r(0, t, r, sh, 6'h00), OP_SLL, r, 0, 0, ALU_SLL, BR_NONE);
      check(d.shamt == 5'(sh), "shamt field");
      expect_op(enc_r(0, t, r, sh, 6'h02), OP_SRL, r, 0, 0, ALU_SRL, BR_NONE);
      expect_op(enc_r(0, t, r, sh, 6'h03), OP_SRA, r, 0, 0, ALU_SRA, BR_NONE);
      expect_op(i_sllv(r, t, s), OP_SLLV, r, 0, 0, ALU_SLL, BR_NONE);
      expect_op(i_srlv(r, t, s), OP_SRLV, r, 0, 0, ALU_SRL, BR_NONE);
      expect_op(i_srav(r, t, s), OP_SRAV, r, 0, 0, ALU_SRA, BR_NONE);
      expect_op(enc_r(s, t, 0, 0, 6'h08), OP_JR, 0, 0, 0, ALU_ADD, BR_NONE);
      expect_op(enc_r(s, t, r, 0, 6'h09), OP_JALR, r, 0, 0, ALU_ADD, BR_NONE);
      expect_op(enc_r(s, t, 0, 0, 6'h18), OP_MULT, 0, 0, 0, ALU_ADD, BR_NONE);
      expect_op(enc_r(s, t, 0, 0, 6'h19), OP_MULTU, 0, 0, 0, ALU_ADD, BR_NONE);
      expect_op(enc_r(s, t, r, 0, 6'h10), OP_MFHI, r, 0, 0, ALU_ADD, BR_NONE);
      check(d.res == RES_HI, "MFHI result source");
      expect_op(enc_r(s, t, r, 0, 6'h12), OP_MFLO, r, 0, 0, ALU_ADD, BR_NONE);
      check(d.res == RES_LO, "MFLO result source");
      expect_op(i_addiu(t, s, im), OP_ADDIU, t, 1, sx, ALU_ADD, BR_NONE);
      expect_op(enc_i(6'h08, s, t, im), OP_ADDIU, t, 1, sx, ALU_ADD, BR_NONE);
      expect_op(i_slti(t, s, im),  OP_SLTI,  t, 1, sx, ALU_SLT, BR_NONE);
      expect_op(i_sltiu(t, s, im), OP_SLTIU, t, 1, sx, ALU_SLTU, BR_NONE);
      expect_op(i_andi(t, s, im),  OP_ANDI,  t, 1, zx, ALU_AND, BR_NONE);
      expect_op(i_ori(t, s, im),   OP_ORI,   t, 1, zx, ALU_OR, BR_NONE);
      expect_op(i_xori(t, s, im),  OP_XORI,  t, 1, zx, ALU_XOR, BR_NONE);
      expect_op(enc_i(6'h0f, s, t, im), OP_LUI, t, 1, sx, ALU_LUI, BR_NONE);
      expect_op(i_lw(t, s, im), OP_LW, t, 1, sx, ALU_ADD, BR_NONE);
      expect_op(i_sw(t, s, im), OP_SW, 0, 1, sx, ALU_ADD, BR_NONE);
      expect_op(i_beq(s, t, im), OP_BEQ, 0, 0, 0, ALU_ADD, BR_EQ);
      check(d.imm == sx, "branch offset");
      expect_op(i_bne(s, t, im), OP_BNE, 0, 0, 0, ALU_ADD, BR_NE);
      expect_op(enc_i(6'h06, s, t, im), OP_BLEZ, 0, 0, 0, ALU_ADD, BR_LEZ);
      expect_op(enc_i(6'h07, s, t, im), OP_BGTZ, 0, 0, 0, ALU_ADD, BR_GTZ);
      expect_op(enc_i(6'h01, s, 0, im), OP_BLTZ, 0, 0, 0, ALU_ADD, BR_LTZ);
      expect_op(enc_i(6'h01, s, 1, im), OP_BGEZ, 0, 0, 0, ALU_ADD, BR_GEZ);
      expect_op({6'h02, 26'($urandom)}, OP_J, 0, 0, 0, ALU_ADD, BR_NONE);
      check(d.jidx == instr[25:0], "jump index");
      expect_op({6'h03, 26'($urandom)}, OP_JAL, 31, 0, 0, ALU_ADD, BR_NONE);
      check(d.res == RES_LINK, "JAL link");
      // unsupported encodings
      expect_op(enc_i(6'h20, s, t, im), OP_INVALID, 0, 0, 0, ALU_ADD, BR_NONE); // LB
      expect_op(enc_r(s, t, r, 0, 6'h1a), OP_INVALID, 0, 0, 0, ALU_ADD, BR_NONE); // DIV
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
