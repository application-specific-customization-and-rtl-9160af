// tb_soft_mp_full: the soft multiprocessor at its default size (16 processors
// on a 4 x 4 mesh, 4-stage pipelines, 4-word FIFOs, host input at processor 0
// and host output at processor 15), taken through a complete stream run.
//
// Thirteen processors form a pipeline that snakes through the mesh:
// 0 1 2 3 / 7 6 5 4 / 8 9 10 11 / 15. Each reads a word from the neighbour
// before it, computes r * (p + 3) + p with the multiplier (p = its own
// number) and passes the result on; processors 12, 13 and 14 idle in a loop.
// Every result leaving processor 15 is checked against the same fold computed
// here, and the steady-state cycles per output are reported.
module tb_soft_mp_full;
  import smp_pkg::*;
  localparam int NITEM = 30;
  localparam int PATH_LEN = 13;
  localparam int PATH [PATH_LEN] = '{0, 1, 2, 3, 7, 6, 5, 4, 8, 9, 10, 11, 15};

  logic clk = 0, rst = 1;
  logic        ld_we, ld_imem;
  logic [7:0]  ld_proc;
  logic [15:0] ld_addr;
  logic [31:0] ld_data;
  logic [0:0]  in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data [1], out_data [1];
  logic [15:0] retire, stall, taken;
  int checks = 0, failures = 0;

  soft_mp dut (
    .clk, .rst, .ld_we, .ld_imem, .ld_proc, .ld_addr, .ld_data,
    .ext_in_valid(in_valid), .ext_in_data(in_data), .ext_in_ready(in_ready),
    .ext_out_valid(out_valid), .ext_out_data(out_data), .ext_out_ready(out_ready),
    .cpu_retire(retire), .cpu_stall(stall), .cpu_taken(taken));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Port a processor at mesh position a uses to reach neighbour b.
  function automatic int dir(int a, int b);
    if (b == a - 4) return PORT_N;
    if (b == a + 4) return PORT_S;
    if (b == a + 1) return PORT_E;
    return PORT_W;
  endfunction

  function automatic int opposite(int d);
    case (d)
      PORT_N: return PORT_S;
      PORT_S: return PORT_N;
      PORT_E: return PORT_W;
      default: return PORT_E;
    endcase
  endfunction

  function automatic logic [31:0] stage_fn(int p, logic [31:0] r);
    return r * 32'(p + 3) + 32'(p);
  endfunction

  task automatic load_word(int p, int a, logic [31:0] w);
    @(negedge clk);
    ld_we = 1; ld_imem = 1; ld_proc = 8'(p); ld_addr = 16'(a); ld_data = w;
  endtask

  logic [31:0] items [NITEM];
  int sent, got, cycle, t4, tlast, n_stall;

  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  always @(negedge clk) begin
    in_valid[0]  <= !rst && sent < NITEM && in_ready[0];
    in_data[0]   <= items[sent < NITEM ? sent : 0];
    out_ready[0] <= 1'b1;
  end

  always @(posedge clk) if (!rst) begin
    logic [31:0] e;
    if (in_valid[0] && in_ready[0]) sent++;
    if (out_valid[0] && out_ready[0]) begin
      e = items[got < NITEM ? got : 0];
      for (int k = 0; k < PATH_LEN; k++) e = stage_fn(PATH[k], e);
      check(got < NITEM && out_data[0] == e, $sformatf("result %0d = %h, expected %h", got, out_data[0], e));
      if (got == 4) t4 = cycle;
      tlast = cycle;
      got++;
    end
    n_stall += $countones(stall);
  end

  initial begin
    ld_we = 0; ld_imem = 1; ld_proc = 0; ld_addr = 0; ld_data = 0;
    sent = 0; got = 0; n_stall = 0;
    for (int i = 0; i < NITEM; i++) items[i] = $urandom;
    repeat (2) @(negedge clk);
    for (int p = 0; p < 16; p++) begin
      int k, pin, pout;
      k = -1;
      for (int j = 0; j < PATH_LEN; j++) if (PATH[j] == p) k = j;
      load_word(p, 0, i_lui(1, 16'h8000));
      if (k < 0) begin
        load_word(p, 1, i_j(1));
        load_word(p, 2, i_nop());
      end else begin
        pin  = (k == 0) ? PORT_EXT : opposite(dir(PATH[k - 1], p));
        pout = (k == PATH_LEN - 1) ? PORT_EXT : dir(p, PATH[k + 1]);
        load_word(p, 1, i_addiu(5, 0, p + 3));
        load_word(p, 2, i_fifo_rd(2, 1, pin));
        load_word(p, 3, i_mult(2, 5));
        load_word(p, 4, i_mflo(3));
        load_word(p, 5, i_addiu(3, 3, p));
        load_word(p, 6, i_j(2));
        load_word(p, 7, i_fifo_wr(3, 1, pout));       // delay slot
      end
    end
    @(negedge clk);
    ld_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 50000 && got < NITEM; t++) @(posedge clk);
    check(got == NITEM, $sformatf("%0d of %0d results", got, NITEM));
    check(n_stall > 0, "processors waited on FIFOs");
    if (got == NITEM)
      $display("16-processor mesh: %0.2f cycles per output", real'(tlast - t4) / real'(NITEM - 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
