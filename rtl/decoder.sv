// decoder: MIPS-I instruction decoder with instruction-set subsetting.
//
// Turns a 32-bit instruction word into the control struct dec_t used by the
// execute stage: operation, ALU function and operand sources, extended
// immediate, source and destination registers, load/store, branch condition,
// jump kind and multiplier control. Purely combinational.
//
// Subsetting: the ISA_EN parameter holds one bit per supported operation
// (bit index = op_e value). An operation whose bit is clear is not decoded;
// it becomes OP_INVALID with no side effect (no register write, memory access,
// branch or multiply), as if its datapath and control had been removed. A
// processor generated for one program gets the mask of the instructions that
// program uses. Unknown encodings are handled the same way.
//
// The MIPS encodings are standard; the subset, the mask form of the
// customisation and the no-effect treatment of removed instructions are this
// design's choices.
module decoder
  import smp_pkg::*;
#(
  parameter isa_mask_t ISA_EN = ISA_ALL
) (
  input  logic [31:0] instr,
  output dec_t        d
);
  logic [5:0] opc, funct;
  logic [4:0] rs, rt, rd;
  op_e        op_raw;

  assign opc   = instr[31:26];
  assign funct = instr[5:0];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];

  // Operation from the encoding.
  always_comb begin
    op_raw = OP_INVALID;
    unique case (opc)
      6'h00: begin
        unique case (funct)
          6'h00: op_raw = OP_SLL;
          6'h02: op_raw = OP_SRL;
          6'h03: op_raw = OP_SRA;
          6'h04: op_raw = OP_SLLV;
          6'h06: op_raw = OP_SRLV;
          6'h07: op_raw = OP_SRAV;
          6'h08: op_raw = OP_JR;
          6'h09: op_raw = OP_JALR;
          6'h10: op_raw = OP_MFHI;
          6'h12: op_raw = OP_MFLO;
          6'h18: op_raw = OP_MULT;
          6'h19: op_raw = OP_MULTU;
          6'h20, 6'h21: op_raw = OP_ADDU;
          6'h22, 6'h23: op_raw = OP_SUBU;
          6'h24: op_raw = OP_AND;
          6'h25: op_raw = OP_OR;
          6'h26: op_raw = OP_XOR;
          6'h27: op_raw = OP_NOR;
          6'h2a: op_raw = OP_SLT;
          6'h2b: op_raw = OP_SLTU;
          default: op_raw = OP_INVALID;
        endcase
      end
      6'h01: op_raw = (rt == 5'd0) ? OP_BLTZ : (rt == 5'd1) ? OP_BGEZ : OP_INVALID;
      6'h02: op_raw = OP_J;
      6'h03: op_raw = OP_JAL;
      6'h04: op_raw = OP_BEQ;
      6'h05: op_raw = OP_BNE;
      6'h06: op_raw = OP_BLEZ;
      6'h07: op_raw = OP_BGTZ;
      6'h08, 6'h09: op_raw = OP_ADDIU;
      6'h0a: op_raw = OP_SLTI;
      6'h0b: op_raw = OP_SLTIU;
      6'h0c: op_raw = OP_ANDI;
      6'h0d: op_raw = OP_ORI;
      6'h0e: op_raw = OP_XORI;
      6'h0f: op_raw = OP_LUI;
      6'h23: op_raw = OP_LW;
      6'h2b: op_raw = OP_SW;
      default: op_raw = OP_INVALID;
    endcase
  end

  // Control for the (possibly removed) operation.
  always_comb begin
    d            = '0;
    d.op         = (op_raw != OP_INVALID && ISA_EN[op_raw]) ? op_raw : OP_INVALID;
    d.alu_op     = ALU_ADD;
    d.res        = RES_ALU;
    d.br         = BR_NONE;
    d.shamt      = instr[10:6];
    d.rs         = rs;
    d.rt         = rt;
    d.jidx       = instr[25:0];
    d.imm        = {{16{instr[15]}}, instr[15:0]};
    unique case (d.op)
      OP_ADDU:  begin d.alu_op = ALU_ADD;  d.wa = rd; end
      OP_SUBU:  begin d.alu_op = ALU_SUB;  d.wa = rd; end
      OP_AND:   begin d.alu_op = ALU_AND;  d.wa = rd; end
      OP_OR:    begin d.alu_op = ALU_OR;   d.wa = rd; end
      OP_XOR:   begin d.alu_op = ALU_XOR;  d.wa = rd; end
      OP_NOR:   begin d.alu_op = ALU_NOR;  d.wa = rd; end
      OP_SLT:   begin d.alu_op = ALU_SLT;  d.wa = rd; end
      OP_SLTU:  begin d.alu_op = ALU_SLTU; d.wa = rd; end
      OP_SLL:   begin d.alu_op = ALU_SLL;  d.wa = rd; d.a_shamt = 1'b1; end
      OP_SRL:   begin d.alu_op = ALU_SRL;  d.wa = rd; d.a_shamt = 1'b1; end
      OP_SRA:   begin d.alu_op = ALU_SRA;  d.wa = rd; d.a_shamt = 1'b1; end
      OP_SLLV:  begin d.alu_op = ALU_SLL;  d.wa = rd; end
      OP_SRLV:  begin d.alu_op = ALU_SRL;  d.wa = rd; end
      OP_SRAV:  begin d.alu_op = ALU_SRA;  d.wa = rd; end
      OP_JR:    begin d.jreg = 1'b1; end
      OP_JALR:  begin d.jreg = 1'b1; d.wa = rd; d.res = RES_LINK; end
      OP_MULT:  begin d.mul = 1'b1; d.mul_signed = 1'b1; end
      OP_MULTU: begin d.mul = 1'b1; end
      OP_MFHI:  begin d.wa = rd; d.res = RES_HI; end
      OP_MFLO:  begin d.wa = rd; d.res = RES_LO; end
      OP_ADDIU: begin d.alu_op = ALU_ADD;  d.b_imm = 1'b1; d.wa = rt; end
      OP_SLTI:  begin d.alu_op = ALU_SLT;  d.b_imm = 1'b1; d.wa = rt; end
      OP_SLTIU: begin d.alu_op = ALU_SLTU; d.b_imm = 1'b1; d.wa = rt; end
      OP_ANDI:  begin d.alu_op = ALU_AND;  d.b_imm = 1'b1; d.wa = rt; d.imm = {16'b0, instr[15:0]}; end
      OP_ORI:   begin d.alu_op = ALU_OR;   d.b_imm = 1'b1; d.wa = rt; d.imm = {16'b0, instr[15:0]}; end
      OP_XORI:  begin d.alu_op = ALU_XOR;  d.b_imm = 1'b1; d.wa = rt; d.imm = {16'b0, instr[15:0]}; end
      OP_LUI:   begin d.alu_op = ALU_LUI;  d.b_imm = 1'b1; d.wa = rt; end
      OP_LW:    begin d.alu_op = ALU_ADD;  d.b_imm = 1'b1; d.wa = rt; d.load = 1'b1; end
      OP_SW:    begin d.alu_op = ALU_ADD;  d.b_imm = 1'b1; d.store = 1'b1; end
      OP_BEQ:   d.br = BR_EQ;
      OP_BNE:   d.br = BR_NE;
      OP_BLEZ:  d.br = BR_LEZ;
      OP_BGTZ:  d.br = BR_GTZ;
      OP_BLTZ:  d.br = BR_LTZ;
      OP_BGEZ:  d.br = BR_GEZ;
      OP_J:     d.jump = 1'b1;
      OP_JAL:   begin d.jump = 1'b1; d.wa = 5'd31; d.res = RES_LINK; end
      default:  ;
    endcase
    d.we = (d.wa != 5'd0);
  end
endmodule
