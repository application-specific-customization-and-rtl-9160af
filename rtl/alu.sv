// alu: integer arithmetic, logic, compare and shift unit of the execute stage.
//
// Purely combinational. Shifts move operand B by the low five bits of operand
// A (the decoder puts the shamt field or rs there), matching MIPS SLL/SLLV
// operand order. ALU_LUI places the low half of B in the upper half.
// The operation set is the MIPS-I integer subset; its organisation is this
// design's own.
module alu
  import smp_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = 32'($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'b0};
      default:  y = '0;
    endcase
  end
endmodule
