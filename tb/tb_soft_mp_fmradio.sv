// tb_soft_mp_fmradio: the split-join structure of a software FM radio, run on
// the default 16-processor system with point-to-point links.
//
// The stream graph is the usual FM-radio shape: a source, an FM demodulator,
// a duplicate splitter feeding three equaliser bands (each a low-pass then a
// high-pass filter), a round-robin joiner, an adder that sums the bands, and
// a sink. One filter per processor, so twelve of the sixteen processors run
// and four idle. The filters are small integer filters chosen here, not the
// radio's real coefficients:
//   demod     d[n] = (x[n] * x[n-1]) >>> 8          (signed, low 32 product bits)
//   band k    l[n] = (d[n] + d[n-1]) * (k + 2)       (low-pass)
//             h[n] = l[n] - l[n-1]                   (high-pass)
//   joiner    h0[n], h1[n], h2[n] in turn
//   adder     y[n] = h0[n] + h1[n] + h2[n]
// All filter state starts at zero.
//
// Point-to-point ports are numbered by peer: processor p pops data from
// processor q on input port q and pushes data for q on output port q; its
// host port is its own number. The splitter therefore drives three output
// ports and the joiner drains three input ports.
//
// Checks: every output against the same filters computed here; the
// steady-state rate equals the slowest filter's loop (7 instructions plus one
// squashed fetch after the taken jump = 8 cycles at 4 stages); FIFO waits and
// host backpressure both occur; the splitter and the joiner each use three
// distinct ports.
module tb_soft_mp_fmradio;
  import smp_pkg::*;
  localparam int NITEM = 40;
  localparam int NBAND = 3;
  localparam int P_SRC = 0, P_DEMOD = 1, P_SPLIT = 2, P_LPF = 3, P_HPF = 6,
                 P_JOIN = 9, P_ADD = 10, P_SINK = 11;
  localparam int FM_NLINK = 15;

  function automatic link_table_t fm_links();
    link_table_t t;
    int n;
    t = '0;
    n = 0;
    t[n] = mk_link(int'(EXT), 0, P_SRC, P_SRC);          n++;
    t[n] = mk_link(P_SRC, P_DEMOD, P_DEMOD, P_SRC);       n++;
    t[n] = mk_link(P_DEMOD, P_SPLIT, P_SPLIT, P_DEMOD);   n++;
    for (int k = 0; k < NBAND; k++) begin
      t[n] = mk_link(P_SPLIT, P_LPF + k, P_LPF + k, P_SPLIT);         n++;
      t[n] = mk_link(P_LPF + k, P_HPF + k, P_HPF + k, P_LPF + k);     n++;
      t[n] = mk_link(P_HPF + k, P_JOIN, P_JOIN, P_HPF + k);           n++;
    end
    t[n] = mk_link(P_JOIN, P_ADD, P_ADD, P_JOIN);         n++;
    t[n] = mk_link(P_ADD, P_SINK, P_SINK, P_ADD);         n++;
    t[n] = mk_link(P_SINK, P_SINK, int'(EXT), 0);
    return t;
  endfunction
  localparam link_table_t FM_LINKS = fm_links();

  logic clk = 0, rst = 1;
  logic        ld_we, ld_imem;
  logic [7:0]  ld_proc;
  logic [15:0] ld_addr;
  logic [31:0] ld_data;
  logic [0:0]  in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data [1], out_data [1];
  logic [15:0] retire, stall, taken;
  int checks = 0, failures = 0;

  soft_mp #(.NLINK(FM_NLINK), .LINKS(FM_LINKS)) dut (
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

  // ------------------------------------------------------------ programs --
  // r1 = FIFO window. Every program is: lui r1; [setup]; loop body; j loop;
  // last push in the delay slot.
  logic [31:0] prog [$];

  task automatic build(int p);
    int lp;
    prog.delete();
    prog.push_back(i_lui(1, 16'h8000));
    if (p == P_SRC) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_SRC));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(2, 1, P_DEMOD));
    end else if (p == P_DEMOD) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_SRC));
      prog.push_back(i_mult(2, 4));
      prog.push_back(i_mflo(3));
      prog.push_back(i_sra(3, 3, 8));
      prog.push_back(i_addu(4, 2, 0));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(3, 1, P_SPLIT));
    end else if (p == P_SPLIT) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_DEMOD));
      prog.push_back(i_fifo_wr(2, 1, P_LPF + 0));
      prog.push_back(i_fifo_wr(2, 1, P_LPF + 1));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(2, 1, P_LPF + 2));
    end else if (p >= P_LPF && p < P_LPF + NBAND) begin
      prog.push_back(i_addiu(5, 0, p - P_LPF + 2));
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_SPLIT));
      prog.push_back(i_addu(3, 2, 4));
      prog.push_back(i_addu(4, 2, 0));
      prog.push_back(i_mult(3, 5));
      prog.push_back(i_mflo(3));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(3, 1, p - P_LPF + P_HPF));
    end else if (p >= P_HPF && p < P_HPF + NBAND) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, p - P_HPF + P_LPF));
      prog.push_back(i_subu(3, 2, 4));
      prog.push_back(i_addu(4, 2, 0));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(3, 1, P_JOIN));
    end else if (p == P_JOIN) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_HPF + 0));
      prog.push_back(i_fifo_wr(2, 1, P_ADD));
      prog.push_back(i_fifo_rd(2, 1, P_HPF + 1));
      prog.push_back(i_fifo_wr(2, 1, P_ADD));
      prog.push_back(i_fifo_rd(2, 1, P_HPF + 2));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(2, 1, P_ADD));
    end else if (p == P_ADD) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_JOIN));
      prog.push_back(i_fifo_rd(3, 1, P_JOIN));
      prog.push_back(i_addu(2, 2, 3));
      prog.push_back(i_fifo_rd(3, 1, P_JOIN));
      prog.push_back(i_addu(2, 2, 3));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(2, 1, P_SINK));
    end else if (p == P_SINK) begin
      lp = prog.size();
      prog.push_back(i_fifo_rd(2, 1, P_ADD));
      prog.push_back(i_j(lp));
      prog.push_back(i_fifo_wr(2, 1, P_SINK));
    end else begin
      prog.push_back(i_j(1));
      prog.push_back(i_nop());
    end
  endtask

  task automatic load_word(int p, int a, logic [31:0] w);
    @(negedge clk);
    ld_we = 1; ld_imem = 1; ld_proc = 8'(p); ld_addr = 16'(a); ld_data = w;
  endtask

  // ------------------------------------------------------ reference model --
  logic [31:0] items [NITEM];
  logic [31:0] expect_q [NITEM];

  task automatic reference();
    logic [31:0] xprev, dprev, lprev [NBAND];
    logic [31:0] d, l, y;
    xprev = 0; dprev = 0;
    for (int k = 0; k < NBAND; k++) lprev[k] = 0;
    for (int n = 0; n < NITEM; n++) begin
      d = $signed(items[n] * xprev) >>> 8;
      y = 0;
      for (int k = 0; k < NBAND; k++) begin
        l = (d + dprev) * 32'(k + 2);
        y += l - lprev[k];
        lprev[k] = l;
      end
      expect_q[n] = y;
      xprev = items[n];
      dprev = d;
    end
  endtask

  // ---------------------------------------------------------- stimulus ----
  int sent, got, cycle, t4, tlast, n_stall, n_backpressure;
  logic [15:0] split_push_seen, join_pop_seen;

  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  // The sink is throttled for a while in the middle of the run so the
  // backpressure reaches the host input.
  always @(negedge clk) begin
    in_valid[0]  <= !rst && sent < NITEM && in_ready[0];
    in_data[0]   <= items[sent < NITEM ? sent : 0];
    out_ready[0] <= !(got >= 20 && got < 24 && cycle[2:0] != 0);
  end

  always @(posedge clk) if (!rst) begin
    if (in_valid[0] && in_ready[0]) sent++;
    if (sent < NITEM && !in_ready[0]) n_backpressure++;
    if (out_valid[0] && out_ready[0]) begin
      check(got < NITEM && out_data[0] == expect_q[got < NITEM ? got : 0],
            $sformatf("output %0d = %h, expected %h", got, out_data[0],
                      expect_q[got < NITEM ? got : 0]));
      if (got == 4) t4 = cycle;
      if (got == 19) tlast = cycle;
      got++;
    end
    n_stall += $countones(stall);
    split_push_seen |= dut.g_cpu[P_SPLIT].u_cpu.out_push;
    join_pop_seen   |= dut.g_cpu[P_JOIN].u_cpu.in_pop;
  end

  initial begin
    ld_we = 0; ld_imem = 1; ld_proc = 0; ld_addr = 0; ld_data = 0;
    sent = 0; got = 0; n_stall = 0; n_backpressure = 0;
    split_push_seen = '0; join_pop_seen = '0;
    for (int i = 0; i < NITEM; i++) items[i] = $urandom;
    reference();
    repeat (2) @(negedge clk);
    for (int p = 0; p < 16; p++) begin
      build(p);
      foreach (prog[a]) load_word(p, a, prog[a]);
    end
    @(negedge clk);
    ld_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 50000 && got < NITEM; t++) @(posedge clk);
    check(got == NITEM, $sformatf("%0d of %0d outputs", got, NITEM));
    // Outputs 5..19 are produced before the sink is throttled.
    check(tlast - t4 == 8 * 15,
          $sformatf("%0d cycles for 15 outputs, expected 8 per output", tlast - t4));
    check(n_stall > 0, "processors waited on FIFOs");
    check(n_backpressure > 0, "host input saw backpressure");
    check($countones(split_push_seen) == NBAND, "splitter pushes on three ports");
    check($countones(join_pop_seen) == NBAND, "joiner pops from three ports");
    $display("FM radio split-join: %0.2f cycles per output, %0d processor stall cycles, %0d host backpressure cycles",
             real'(tlast - t4) / 15.0, n_stall, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
