// tb_regfile: self-checking testbench for the register file.
// Random writes and reads against an array model; checks r0 stays zero,
// write-through on a same-cycle read and reset clearing.
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i);
      #1 check(rd1 == 0, "reset value");
    end
    for (int i = 0; i < 3000; i++) begin
      we  = $urandom_range(0, 1);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (i % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      check(rd1 == ((ra1 == 0) ? 0 : (we && wa == ra1) ? wd : model[ra1]), "read port 1");
      check(rd2 == ((ra2 == 0) ? 0 : (we && wa == ra2) ? wd : model[ra2]), "read port 2");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
