// tb_fifo_io: self-checking testbench for the memory-mapped FIFO port unit.
// Random accesses (data memory, FIFO load, FIFO store) with random empty/full
// flags; checks the FIFO window decode, port selection, that exactly one pop
// or push strobe is given when the access can complete in this cycle, and
// that stall is raised (with no strobe) when it cannot.
module tb_fifo_io;
  import smp_pkg::*;
  localparam int NPORT = 16;
  logic valid, load, store, is_fifo, stall;
  logic [31:0] addr, wdata, rdata, out_data;
  logic [NPORT-1:0] in_empty, in_pop, out_full, out_push;
  logic [31:0] in_data [NPORT];
  int checks = 0, failures = 0, n_stall = 0, n_go = 0;

  fifo_io #(.NPORT(NPORT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h", what, addr); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int port, kind;
      bit fifo_win, exp_stall;
      port = $urandom_range(0, NPORT - 1);
      kind = $urandom_range(0, 2);          // 0 none, 1 load, 2 store
      fifo_win = $urandom_range(0, 1);
      valid = $urandom_range(0, 7) != 0;
      load = (kind == 1); store = (kind == 2);
      addr = fifo_win ? (FIFO_BASE | 32'(port * 4)) : {1'b0, 31'($urandom)} & ~32'h3;
      wdata = $urandom;
      in_empty = NPORT'($urandom); out_full = NPORT'($urandom);
      for (int k = 0; k < NPORT; k++) in_data[k] = $urandom;
      #1;
      exp_stall = valid && fifo_win && ((load && in_empty[port]) || (store && out_full[port]));
      check(is_fifo == fifo_win, "FIFO window decode");
      check(stall == exp_stall, "stall");
      check(out_data == wdata, "store data");
      if (valid && fifo_win && load) check(rdata == in_data[port], "selected input data");
      check(in_pop == ((valid && fifo_win && load && !in_empty[port]) ? NPORT'(1) << port : '0), "pop strobe");
      check(out_push == ((valid && fifo_win && store && !out_full[port]) ? NPORT'(1) << port : '0), "push strobe");
      if (exp_stall) n_stall++;
      if (in_pop != 0 || out_push != 0) n_go++;
    end
    check(n_stall > 0 && n_go > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
