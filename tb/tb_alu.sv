// tb_alu: self-checking testbench for the ALU.
// Random and corner operands for every ALU operation, compared with results
// computed here from the MIPS definitions.
module tb_alu;
  import smp_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y, exp;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int sh;
    sh = int'(x % 32);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (signed'(x) < signed'(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_SLL:  return z << sh;
      ALU_SRL:  return z >> sh;
      ALU_SRA:  begin
                  logic [31:0] r;
                  r = z;
                  for (int i = 0; i < sh; i++) r = {r[31], r[31:1]};
                  return r;
                end
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6];
    corner = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      for (int i = 0; i < 36; i++) begin
        op = alu_op_e'(o); a = corner[i % 6]; b = corner[i / 6];
        #1 exp = ref_alu(op, a, b);
        checks++;
        if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp); end
      end
      for (int i = 0; i < 300; i++) begin
        op = alu_op_e'(o); a = $urandom; b = $urandom;
        #1 exp = ref_alu(op, a, b);
        checks++;
        if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
