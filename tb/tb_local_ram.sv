// tb_local_ram: self-checking testbench for the local memory.
// Random writes and reads against an array model; checks the one-cycle read
// latency, hold while re is low, and read-before-write on a same-word access.
module tb_local_ram;
  localparam int WORDS = 256;
  logic clk = 0, re, we;
  logic [7:0] raddr, waddr;
  logic [31:0] rdata, wdata, model [WORDS], exp;
  int checks = 0, failures = 0;

  local_ram #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 4000; i++) begin
      re = $urandom_range(0, 3) != 0;
      raddr = 8'($urandom);
      we = $urandom_range(0, 1);
      waddr = (i % 5 == 0) ? raddr : 8'($urandom);
      wdata = $urandom;
      if (re) exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL read %h exp %h", rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
