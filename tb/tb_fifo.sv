// tb_fifo: self-checking testbench for the circular FIFO.
// Drives random pushes and pops (only legal ones, as the processor interface
// does) against a queue reference model and checks data order, the full and
// empty flags every cycle, push+pop on a full FIFO, and that a pushed word is
// visible the next cycle.
module tb_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic push, pop, full, empty;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int n_full = 0, n_both_full = 0;

  fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // latency: push one word, visible on the next cycle
    push = 1; wdata = 32'hA5A5_0001;
    @(negedge clk);
    push = 0;
    check(!empty && rdata == 32'hA5A5_0001, "word visible one cycle after push");
    pop = 1;
    @(negedge clk);
    pop = 0;
    check(empty, "empty after single pop");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      // compare flags and head with the model
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) n_full++;
      pop   = !empty && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      push  = $urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30);
      if (full && !pop) push = 0;
      wdata = $urandom;
      if (full && push && pop) n_both_full++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
      @(negedge clk);
    end
    push = 0; pop = 0;
    check(n_full > 0, "FIFO reached full");
    check(n_both_full > 0, "push and pop together on a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
