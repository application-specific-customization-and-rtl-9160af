// tb_soft_cpu: self-checking testbench for the soft processor.
// A three-, a four- and a five-stage processor run the same program, loaded
// through the load port. The program reads words from FIFO input port 0,
// computes with back-to-back dependencies (load-use, shift, multiply with
// MFLO/MFHI, store then load of data memory, arithmetic shift, compare, NOR),
// writes results to FIFO output port 1, loops with a branch whose delay slot
// accumulates a checksum, then calls a subroutine with JAL/JR.
// Outputs are compared with values computed here. Phase 1 keeps the input
// FIFO full and the output FIFO free and checks the cycles per loop
// iteration: 17 for three stages, 18 for four (one squashed fetch per taken
// branch), 20 for five (plus two load-use waits per iteration). Phase 2 makes the FIFOs randomly empty or full and checks that the
// processors stall, retry and still produce the same results.
module tb_soft_cpu;
  import smp_pkg::*;
  localparam int NPORT = 4;
  localparam int N     = 24;
  localparam int BODY  = 17;

  logic clk = 0, rst = 1;
  logic ld_we = 0;
  logic [15:0] ld_addr;
  logic [31:0] ld_data;
  int checks = 0, failures = 0;

  localparam int NC = 3;
  localparam int EXTRA [NC] = '{0, 1, 3};   // cycles per iteration beyond BODY
  logic [NPORT-1:0] in_empty [NC], in_pop [NC], out_full [NC], out_push [NC];
  logic [31:0]      in_data  [NC][NPORT];
  logic [31:0]      out_data [NC];
  logic             retire [NC], stall [NC], taken [NC];

  soft_cpu #(.STAGES(3), .NPORT(NPORT), .IMEM_WORDS(256), .DMEM_WORDS(256)) dut3 (
    .clk, .rst, .ld_we, .ld_imem(1'b1), .ld_addr, .ld_data,
    .in_empty(in_empty[0]), .in_data(in_data[0]), .in_pop(in_pop[0]),
    .out_full(out_full[0]), .out_data(out_data[0]), .out_push(out_push[0]),
    .retire(retire[0]), .stall(stall[0]), .taken(taken[0]));
  soft_cpu #(.STAGES(4), .NPORT(NPORT), .IMEM_WORDS(256), .DMEM_WORDS(256)) dut4 (
    .clk, .rst, .ld_we, .ld_imem(1'b1), .ld_addr, .ld_data,
    .in_empty(in_empty[1]), .in_data(in_data[1]), .in_pop(in_pop[1]),
    .out_full(out_full[1]), .out_data(out_data[1]), .out_push(out_push[1]),
    .retire(retire[1]), .stall(stall[1]), .taken(taken[1]));
  soft_cpu #(.STAGES(5), .NPORT(NPORT), .IMEM_WORDS(256), .DMEM_WORDS(256)) dut5 (
    .clk, .rst, .ld_we, .ld_imem(1'b1), .ld_addr, .ld_data,
    .in_empty(in_empty[2]), .in_data(in_data[2]), .in_pop(in_pop[2]),
    .out_full(out_full[2]), .out_data(out_data[2]), .out_push(out_push[2]),
    .retire(retire[2]), .stall(stall[2]), .taken(taken[2]));

  always #5 clk = ~clk;

  logic [31:0] prog [32];
  logic [31:0] inq  [NC][$];
  logic [31:0] outq [NC][$];
  logic [31:0] expq [$];
  int          out_time [NC][$];
  bit          gap_in [NC], gap_out [NC];
  bit          random_gaps;
  int          cycle, n_stall [NC], n_taken [NC], taken_at_last [NC];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO models around the processors.
  for (genvar c = 0; c < NC; c++) begin : g_env
    always_comb begin
      in_empty[c] = '1;
      for (int k = 0; k < NPORT; k++) in_data[c][k] = 32'hDEAD_0000 + 32'(k);
      in_empty[c][0] = (inq[c].size() == 0) || gap_in[c];
      if (inq[c].size() != 0) in_data[c][0] = inq[c][0];
      out_full[c] = '0;
      out_full[c][1] = gap_out[c];
    end
    always @(posedge clk) begin
      if (!rst) begin
        if (in_pop[c][0]) void'(inq[c].pop_front());
        if (out_push[c][1]) begin outq[c].push_back(out_data[c]); out_time[c].push_back(cycle); taken_at_last[c] = n_taken[c]; end
        check(in_pop[c][3:1] == 0 && out_push[c][0] == 0 && out_push[c][3:2] == 0, "only ports 0/1 used");
        if (stall[c]) n_stall[c]++;
        if (taken[c]) n_taken[c]++;
      end
    end
    always @(negedge clk) begin
      gap_in[c]  <= random_gaps && ($urandom_range(0, 99) < 40);
      gap_out[c] <= random_gaps && ($urandom_range(0, 99) < 40);
    end
  end

  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_program();
    for (int i = 0; i < 32; i++) prog[i] = i_nop();
    prog[0]  = i_lui(1, 16'h8000);
    prog[1]  = i_addiu(10, 0, N);
    prog[2]  = i_addiu(9, 0, 0);
    prog[3]  = i_addiu(11, 0, 0);
    prog[4]  = i_fifo_rd(2, 1, 0);
    prog[5]  = i_addiu(3, 2, 5);
    prog[6]  = i_sll(4, 3, 2);
    prog[7]  = i_mult(4, 2);
    prog[8]  = i_mflo(5);
    prog[9]  = i_mfhi(6);
    prog[10] = i_sw(5, 0, 32'h100);
    prog[11] = i_lw(7, 0, 32'h100);
    prog[12] = i_addu(8, 7, 6);
    prog[13] = i_fifo_wr(8, 1, 1);
    prog[14] = i_sra(12, 2, 3);
    prog[15] = i_slt(13, 12, 3);
    prog[16] = i_nor(14, 13, 2);
    prog[17] = i_fifo_wr(14, 1, 1);
    prog[18] = i_addiu(9, 9, 1);
    prog[19] = i_bne(9, 10, 4 - 20);
    prog[20] = i_xor(11, 11, 2);          // delay slot
    prog[21] = i_fifo_wr(11, 1, 1);
    prog[22] = i_jal(28);
    prog[23] = i_addiu(15, 0, 3);         // delay slot
    prog[24] = i_fifo_wr(16, 1, 1);
    prog[25] = i_fifo_wr(31, 1, 1);
    prog[26] = i_j(26);
    prog[27] = i_nop();
    prog[28] = i_addiu(16, 15, 74);
    prog[29] = i_jr(31);
    prog[30] = i_nop();
  endtask

  task automatic run(bit gaps);
    logic [31:0] x, chk;
    logic [63:0] p;
    rst = 1;
    random_gaps = gaps;
    for (int c = 0; c < NC; c++) begin inq[c].delete(); outq[c].delete(); out_time[c].delete(); n_stall[c] = 0; n_taken[c] = 0; taken_at_last[c] = 0; end
    expq.delete();
    chk = 0;
    for (int i = 0; i < N; i++) begin
      x = (i < 3) ? ((i == 0) ? 32'h8000_0001 : (i == 1) ? 32'hFFFF_FFF0 : 32'h7FFF_0000) : $urandom;
      for (int c = 0; c < NC; c++) inq[c].push_back(x);
      p = 64'($signed(((x + 32'd5) << 2)) * $signed(x));
      expq.push_back(p[31:0] + p[63:32]);
      expq.push_back(~(32'(($signed(x) >>> 3) < $signed(x + 32'd5)) | x));
      chk ^= x;
    end
    expq.push_back(chk);
    expq.push_back(77);
    expq.push_back(32'd96);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      ld_we = 1; ld_addr = 16'(i); ld_data = prog[i];
      @(negedge clk);
    end
    ld_we = 0;
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NC; c++) begin
      int t;
      t = 0;
      while (outq[c].size() < expq.size() && t < 5000) begin @(posedge clk); t++; end
    end
    repeat (5) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      check(outq[c].size() == expq.size(), $sformatf("cpu%0d output count %0d", c, outq[c].size()));
      for (int i = 0; i < expq.size() && i < outq[c].size(); i++)
        check(outq[c][i] == expq[i], $sformatf("cpu%0d output %0d: %h expected %h", c, i, outq[c][i], expq[i]));
      // N-1 taken loop branches, JAL and JR before the last output
      check(taken_at_last[c] == N + 1, $sformatf("cpu%0d taken branches/jumps %0d", c, taken_at_last[c]));
      if (!gaps) begin
        // only the five-stage pipeline waits: two load-use pairs per iteration
        check(n_stall[c] == ((c == 2) ? 2 * N : 0), $sformatf("cpu%0d stall cycles %0d with free FIFOs", c, n_stall[c]));
        for (int i = 2; i + 2 < 2 * N && i < out_time[c].size(); i += 2)
          check(out_time[c][i] - out_time[c][i - 2] == BODY + EXTRA[c],
                $sformatf("cpu%0d cycles per iteration %0d", c, out_time[c][i] - out_time[c][i - 2]));
      end else begin
        check(n_stall[c] > 0, "stalls on empty/full FIFOs");
      end
    end
  endtask

  initial begin
    ld_addr = 0; ld_data = 0;
    random_gaps = 0;
    build_program();
    run(0);
    run(1);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
