// tb_soft_mp: end-to-end testbench of the soft multiprocessor.
//
// Runs the six-processor communication example (processors on a 3 x 2 grid,
// numbered 0 1 2 / 3 4 5) in both topologies at pipeline depths 3, 4 and 5,
// and once more with a different depth per processor (0:5 1:3 2:4 3:3 4:5
// 5:4), eight systems side by side:
//   processor 3 reads x from the host and produces x+1 and x+2;
//   processor 0 computes 3*(x+1), processor 4 computes ((x+2) << 1) ^ 0x55;
//   processor 5 adds the two and returns the sum to the host.
// Mesh: 3 sends North to 0 and East to 4; 0 and 4 send their results East
// and North to 1, which forwards both East to 2, which forwards both South to
// 5 (two hops of software forwarding, processors 1 and 2 running a reduced
// instruction set of LUI/LW/SW/J only).
// Point-to-point: direct FIFOs 3->0, 3->4, 0->5, 4->5, ports numbered by peer.
//
// Checks every result against the formula, measures cycles per output in a
// free-running phase, requires point-to-point to have a lower latency than
// the mesh (no hops) and no more cycles per output, and counts the mechanisms: FIFO-empty stalls, FIFO-full
// stalls (host output throttled in a second phase), taken branches, hop
// forwarding by 1 and 2 in the mesh and their idleness in point-to-point,
// the instruction subset, and host-stream backpressure. A mechanism never
// seen is a failure.
module tb_soft_mp;
  import smp_pkg::*;
  localparam int NP    = 6;
  localparam int NITEM = 40;
  localparam int NS    = 8;
  localparam int DEPTH [NS] = '{4, 4, 3, 3, 5, 5, 4, 4};   // 6, 7: per processor
  localparam logic [NP-1:0][2:0] MIXED = {3'd4, 3'd5, 3'd3, 3'd4, 3'd3, 3'd5};

  // Reduced instruction set of the forwarding processors.
  localparam isa_mask_t FWD_ISA = (isa_mask_t'(1) << OP_LUI) | (isa_mask_t'(1) << OP_LW) |
                                  (isa_mask_t'(1) << OP_SW)  | (isa_mask_t'(1) << OP_J);
  localparam isa_mask_t [NP-1:0] MESH_ISA = {ISA_ALL, ISA_ALL, ISA_ALL, FWD_ISA, FWD_ISA, ISA_ALL};

  function automatic link_table_t p2p_table();
    link_table_t t;
    t = '0;
    t[0] = mk_link(int'(EXT), 0, 3, 3);
    t[1] = mk_link(3, 0, 0, 3);
    t[2] = mk_link(3, 4, 4, 3);
    t[3] = mk_link(0, 5, 5, 0);
    t[4] = mk_link(4, 5, 5, 4);
    t[5] = mk_link(5, 5, int'(EXT), 0);
    return t;
  endfunction
  localparam link_table_t MESH_T = mesh_table(3, 2, 3, 5);
  localparam link_table_t P2P_T  = p2p_table();

  logic clk = 0, rst = 1;
  logic [NS-1:0] ld_we;
  logic        ld_imem;
  logic [7:0]  ld_proc;
  logic [15:0] ld_addr;
  logic [31:0] ld_data;
  logic        in_valid [NS], in_ready [NS], out_valid [NS], out_ready [NS];
  logic [31:0] in_data  [NS], out_data [NS];
  logic [NP-1:0] retire [NS], stall [NS], taken [NS];
  int checks = 0, failures = 0;

  // system s: even mesh, odd point-to-point; pipeline depth DEPTH[s]
  for (genvar s = 0; s < NS; s++) begin : g_sys
    localparam bit IS_MESH = (s % 2 == 0);
    logic [31:0] eid [1], eod [1];
    logic [0:0]  eiv, eir, eov, eor;
    assign eiv[0] = in_valid[s];
    assign eid[0] = in_data[s];
    assign in_ready[s] = eir[0];
    assign out_valid[s] = eov[0];
    assign out_data[s] = eod[0];
    assign eor[0] = out_ready[s];
    soft_mp #(
      .NPROC(NP), .STAGES(DEPTH[s]), .FIFO_DEPTH(4), .NPORT(8),
      .IMEM_WORDS(64), .DMEM_WORDS(64), .MESH_X(3), .MESH_Y(2),
      .NLINK(IS_MESH ? mesh_nlinks(3, 2) : 6),
      .LINKS(IS_MESH ? MESH_T : P2P_T),
      .ISA_MASKS(IS_MESH ? MESH_ISA : {NP{ISA_ALL}}),
      .CPU_STAGES(s >= 6 ? MIXED : {NP{3'(DEPTH[s])}})
    ) dut (
      .clk, .rst, .ld_we(ld_we[s]), .ld_imem, .ld_proc, .ld_addr, .ld_data,
      .ext_in_valid(eiv), .ext_in_data(eid), .ext_in_ready(eir),
      .ext_out_valid(eov), .ext_out_data(eod), .ext_out_ready(eor),
      .cpu_retire(retire[s]), .cpu_stall(stall[s]), .cpu_taken(taken[s]));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programs --
  typedef logic [31:0] prog_t [16];

  // All programs: r1 = FIFO_BASE, then an endless loop at word 1.
  function automatic prog_t make_prog(bit mesh, int p);
    prog_t w;
    for (int i = 0; i < 16; i++) w[i] = i_nop();
    w[0] = i_lui(1, 16'h8000);
    case (p)
      3: begin
        w[1] = i_fifo_rd(2, 1, mesh ? PORT_EXT : 3);
        w[2] = i_addiu(3, 2, 1);
        w[3] = i_fifo_wr(3, 1, mesh ? PORT_N : 0);
        w[4] = i_addiu(4, 2, 2);
        w[5] = i_j(1);
        w[6] = i_fifo_wr(4, 1, mesh ? PORT_E : 4);      // delay slot
      end
      0: begin
        w[1] = i_fifo_rd(2, 1, mesh ? PORT_S : 3);
        w[2] = i_sll(3, 2, 1);
        w[3] = i_addu(3, 3, 2);
        w[4] = i_j(1);
        w[5] = i_fifo_wr(3, 1, mesh ? PORT_E : 5);
      end
      4: begin
        w[1] = i_fifo_rd(2, 1, mesh ? PORT_W : 3);
        w[2] = i_sll(3, 2, 1);
        w[3] = i_xori(3, 3, 16'h55);
        w[4] = i_j(1);
        w[5] = i_fifo_wr(3, 1, mesh ? PORT_N : 5);
      end
      5: begin
        w[1] = i_fifo_rd(2, 1, mesh ? PORT_N : 0);
        w[2] = i_fifo_rd(3, 1, mesh ? PORT_N : 4);
        w[3] = i_addu(4, 2, 3);
        w[4] = i_j(1);
        w[5] = i_fifo_wr(4, 1, mesh ? PORT_EXT : 5);
      end
      1: if (mesh) begin                                 // W->E, S->E
        w[1] = i_fifo_rd(2, 1, PORT_W);
        w[2] = i_fifo_wr(2, 1, PORT_E);
        w[3] = i_fifo_rd(3, 1, PORT_S);
        w[4] = i_j(1);
        w[5] = i_fifo_wr(3, 1, PORT_E);
      end else begin
        w[1] = i_j(1);
      end
      2: if (mesh) begin                                 // W->S, W->S
        w[1] = i_fifo_rd(2, 1, PORT_W);
        w[2] = i_fifo_wr(2, 1, PORT_S);
        w[3] = i_fifo_rd(3, 1, PORT_W);
        w[4] = i_j(1);
        w[5] = i_fifo_wr(3, 1, PORT_S);
      end else begin
        w[1] = i_j(1);
      end
      default: w[1] = i_j(1);
    endcase
    return w;
  endfunction

  function automatic logic [31:0] expected(logic [31:0] x);
    return (x + 1) * 3 + (((x + 2) << 1) ^ 32'h55);
  endfunction

  // -------------------------------------------------------------- host --
  logic [31:0] items [NITEM];
  int  sent [NS], got [NS], first_t [NS], last_t [NS], lat [NS], cycle;
  bit  throttle, in_gaps;
  int  n_stall_total [NS], n_full_stall [NS], n_taken [NS], n_busy [NS][NP], n_bp [NS];

  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  // Load-use waits of the five-stage source processor (processor 3 uses its
  // FIFO word in the next instruction).
  int n_load_use;
  always @(posedge clk) if (!rst && g_sys[4].dut.g_cpu[3].u_cpu.lu_stall) n_load_use++;

  for (genvar s = 0; s < NS; s++) begin : g_host
    always @(negedge clk) begin
      in_valid[s]  <= !rst && sent[s] < NITEM && in_ready[s] && !(in_gaps && $urandom_range(0, 3) == 0);
      in_data[s]   <= items[sent[s] < NITEM ? sent[s] : 0];
      out_ready[s] <= !(throttle && $urandom_range(0, 99) < 85);
    end
    always @(posedge clk) if (!rst) begin
      if (in_valid[s] && in_ready[s]) sent[s]++;
      if (sent[s] < NITEM && !in_ready[s]) n_bp[s]++;
      if (out_valid[s] && out_ready[s]) begin
        check(got[s] < NITEM && out_data[s] == expected(items[got[s] < NITEM ? got[s] : 0]),
              $sformatf("system %0d result %0d = %h", s, got[s], out_data[s]));
        if (got[s] == 0) lat[s] = cycle;
        if (got[s] == 4) first_t[s] = cycle;
        if (got[s] == NITEM - 5) last_t[s] = cycle;
        got[s]++;
      end
      for (int p = 0; p < NP; p++) begin
        if (stall[s][p]) n_stall_total[s]++;
        if (retire[s][p]) n_busy[s][p]++;
      end
      if (stall[s][5] && !out_ready[s]) n_full_stall[s]++;
      n_taken[s] += $countones(taken[s]);
    end
  end

  task automatic load_all();
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NP; p++) begin
        prog_t w;
        w = make_prog(s % 2 == 0, p);
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          ld_we = NS'(1 << s); ld_imem = 1; ld_proc = 8'(p); ld_addr = 16'(i); ld_data = w[i];
        end
      end
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic run_phase(bit thr, bit gaps);
    rst = 1;
    throttle = thr;
    in_gaps = gaps;
    for (int s = 0; s < NS; s++) begin
      sent[s] = 0; got[s] = 0; n_stall_total[s] = 0; n_full_stall[s] = 0; n_taken[s] = 0; n_bp[s] = 0;
      for (int p = 0; p < NP; p++) n_busy[s][p] = 0;
    end
    for (int i = 0; i < NITEM; i++) items[i] = $urandom;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      begin
        bit all;
        all = 1;
        for (int s = 0; s < NS; s++) if (got[s] != NITEM) all = 0;
        if (all) break;
      end
    end
    for (int s = 0; s < NS; s++) check(got[s] == NITEM, $sformatf("system %0d produced %0d of %0d", s, got[s], NITEM));
  endtask

  initial begin
    real cpo [NS];
    ld_we = 0; ld_imem = 1; ld_proc = 0; ld_addr = 0; ld_data = 0;
    throttle = 0; in_gaps = 0; n_load_use = 0;
    for (int s = 0; s < NS; s++) begin in_valid[s] = 0; out_ready[s] = 1; in_data[s] = 0; end
    load_all();

    // Phase 1: host always ready, measure cycles per output.
    run_phase(0, 0);
    for (int s = 0; s < NS; s++) begin
      cpo[s] = real'(last_t[s] - first_t[s]) / real'(NITEM - 9);
      $display("system %0d (%s, %s stages): %0.2f cycles per output, %0d stall cycles, %0d taken",
               s, (s % 2 == 0) ? "mesh" : "point-to-point", s >= 6 ? "mixed" : $sformatf("%0d", DEPTH[s]),
               cpo[s], n_stall_total[s], n_taken[s]);
      check(n_stall_total[s] > 0, "FIFO-empty stalls happen");
      check(n_taken[s] > 0, "taken branches happen");
    end
    // The hops cost latency; throughput is set by the slowest processor.
    for (int s = 0; s < NS; s++) $display("system %0d: first result after %0d cycles", s, lat[s]);
    for (int s = 0; s < NS; s += 2) check(lat[s + 1] < lat[s], "point-to-point has lower latency than mesh");
    for (int s = 0; s < NS; s += 2) check(cpo[s + 1] <= cpo[s], "point-to-point needs no more cycles per output than mesh");
    check(cpo[0] >= cpo[2] && cpo[1] >= cpo[3], "4 stages need at least as many cycles per output as 3");
    check(cpo[4] >= cpo[0] && cpo[5] >= cpo[1], "5 stages need at least as many cycles per output as 4");
    check(n_load_use > 0, "load-use interlock of the five-stage pipeline happens");
    for (int s = 0; s < NS; s += 2)
      check(n_busy[s][1] > 2 * NITEM && n_busy[s][2] > 2 * NITEM, "mesh hops forwarded by processors 1 and 2");
    for (int s = 1; s < NS; s += 2)
      check(n_busy[s][1] > 0 && n_busy[s][2] > 0, "idle processors still loop in point-to-point");

    // Phase 2: host output throttled and input bursty: FIFOs fill, producers stall on full.
    run_phase(1, 1);
    for (int s = 0; s < NS; s++) begin
      $display("system %0d throttled: %0d stall cycles on a full output, %0d host backpressure cycles",
               s, n_full_stall[s], n_bp[s]);
      check(n_full_stall[s] > 0, "FIFO-full stalls happen");
      check(n_bp[s] > 0, "host input backpressure happens");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
