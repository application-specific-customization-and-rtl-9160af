// tb_mul_unit: self-checking testbench for the multiplier.
// Signed and unsigned random and corner products, checked on HI/LO one clock
// after start; checks HI/LO hold while start is low.
module tb_mul_unit;
  logic clk = 0, rst = 1, start, is_signed;
  logic [31:0] a, b, hi, lo;
  logic [63:0] exp;
  int checks = 0, failures = 0;

  mul_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; is_signed = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      is_signed = i[0];
      case (i % 8)
        0: begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end
        1: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        2: begin a = 32'h8000_0000; b = 32'h7FFF_FFFF; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      if (is_signed) exp = 64'($signed(a) * $signed(b));
      else           exp = {32'h0, a} * {32'h0, b};
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if ({hi, lo} !== exp) begin failures++; $display("FAIL a=%h b=%h s=%0d got %h%h exp %h", a, b, is_signed, hi, lo, exp); end
      a = $urandom; b = $urandom;
      @(negedge clk);
      checks++;
      if ({hi, lo} !== exp) begin failures++; $display("FAIL HI/LO did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
