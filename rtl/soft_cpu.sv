// soft_cpu: one 32-bit MIPS-subset soft processor with its local memories and
// memory-mapped FIFO ports.
//
// Pipeline (STAGES = 3):  IF/D -> EX/M -> WB
// Pipeline (STAGES = 4):  IF -> D -> EX/M -> WB       (fetch and decode split)
// Pipeline (STAGES = 5):  IF -> D -> EX -> M -> WB    (extra execute stage)
//
// IF   The instruction memory is read synchronously with the next PC, so the
//      word for pc_f is present while pc_f is in fetch.
// D    Decode (decoder, with this processor's instruction subset) and register
//      read. The register file writes through, which bypasses write-back to
//      decode.
// EX   ALU, multiplier (HI/LO), branch and jump resolution.
// M    Data memory access and FIFO port access (fifo_io). With three or four
//      stages EX and M are one stage, EX/M.
// WB   Register write. Load data comes from the data memory read port or from
//      the FIFO word captured in M.
//
// Bypasses and interlocks: EX operands are bypassed from WB and, with five
// stages, from M (results that are not loads). With three or four stages
// this covers every dependence, loads included. With five stages an
// instruction in EX that needs the result of a load in M waits one cycle
// (load-use interlock; M receives a bubble). A FIFO load from an empty FIFO
// or a FIFO store to a full FIFO stalls M and everything before it, and the
// access is repeated every cycle until it succeeds; WB receives a bubble.
// While EX is held its operands keep absorbing the bypasses, so no result
// leaves the pipeline unseen.
//
// Control flow: MIPS branch delay slot, branches and jumps resolved in EX,
// static not-taken prediction (fetch continues sequentially). With three
// stages the delay slot covers the resolution latency; with four or five the
// word fetched after the delay slot is squashed on a taken branch or jump,
// one lost cycle.
//
// Loading: while rst is high the host writes the instruction memory
// (ld_imem = 1) or the data memory (ld_imem = 0) through ld_we/ld_addr/ld_data
// (word addresses). Execution starts at address 0 when rst falls.
//
// Status outputs: retire pulses when an instruction completes write-back,
// stall is high in every interlocked cycle (FIFO wait or load-use), taken
// pulses on each taken branch or jump.
//
// From the document: 32-bit MIPS subset, 3-, 4- and 5-stage organisations,
// interlocking, static branch-not-taken, local instruction/data memories,
// memory-mapped single-cycle FIFO access with retry, per-processor
// instruction subsetting. This design's own: where branches resolve, how the
// fifth stage splits EX from M, the bypass network, memory sizes, the load
// port and the address map.
module soft_cpu
  import smp_pkg::*;
#(
  parameter int unsigned STAGES     = 4,
  parameter int unsigned NPORT      = MAX_PORTS,
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 2048,
  parameter isa_mask_t   ISA_EN     = ISA_ALL
) (
  input  logic              clk,
  input  logic              rst,
  // program / data load port (used while rst is high)
  input  logic              ld_we,
  input  logic              ld_imem,
  input  logic [15:0]       ld_addr,
  input  logic [31:0]       ld_data,
  // FIFO ports
  input  logic [NPORT-1:0]  in_empty,
  input  logic [31:0]       in_data [NPORT],
  output logic [NPORT-1:0]  in_pop,
  input  logic [NPORT-1:0]  out_full,
  output logic [31:0]       out_data,
  output logic [NPORT-1:0]  out_push,
  // status
  output logic              retire,
  output logic              stall,
  output logic              taken
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  logic fifo_stall;   // access in M cannot complete: hold M and before
  logic lu_stall;     // load-use (five stages): hold EX and before
  logic hold;         // hold IF, D and EX

  assign hold  = fifo_stall || lu_stall;
  assign stall = hold;

  // ------------------------------------------------------------- fetch ----
  logic [31:0] pc_f, pc_next, target;
  logic        v_f, redirect;
  logic [31:0] imem_rdata;
  logic [IAW-1:0] imem_raddr;

  assign pc_next    = redirect ? target : pc_f + 32'd4;
  assign imem_raddr = (hold || !v_f) ? pc_f[IAW+1:2] : pc_next[IAW+1:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f <= '0;
      v_f  <= 1'b0;
    end else if (!v_f) begin
      v_f  <= 1'b1;
    end else if (!hold) begin
      pc_f <= pc_next;
    end
  end

  local_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .re    (1'b1),
    .raddr (imem_raddr),
    .rdata (imem_rdata),
    .we    (ld_we && ld_imem),
    .waddr (ld_addr[IAW-1:0]),
    .wdata (ld_data)
  );

  // ------------------------------------------------------------ decode ----
  logic [31:0] instr_dc, pc_dc;
  logic        v_dc;

  if (STAGES == 3) begin : g_fd
    assign instr_dc = imem_rdata;
    assign pc_dc    = pc_f;
    assign v_dc     = v_f;
  end else begin : g_f_d
    logic [31:0] instr_d, pc_d;
    logic        v_d;
    always_ff @(posedge clk) begin
      if (rst) begin
        v_d     <= 1'b0;
        instr_d <= '0;
        pc_d    <= '0;
      end else if (!hold) begin
        v_d     <= v_f && !redirect;   // squash the word after the delay slot
        instr_d <= imem_rdata;
        pc_d    <= pc_f;
      end
    end
    assign instr_dc = instr_d;
    assign pc_dc    = pc_d;
    assign v_dc     = v_d;
  end

  dec_t        dec;
  logic [31:0] rf_rd1, rf_rd2;
  logic        wb_v, wb_we;
  logic [4:0]  wb_wa;
  logic [31:0] wb_val;

  decoder #(.ISA_EN(ISA_EN)) u_dec (
    .instr (instr_dc),
    .d     (dec)
  );

  regfile u_rf (
    .clk (clk),
    .rst (rst),
    .ra1 (dec.rs),
    .rd1 (rf_rd1),
    .ra2 (dec.rt),
    .rd2 (rf_rd2),
    .we  (wb_v && wb_we),
    .wa  (wb_wa),
    .wd  (wb_val)
  );

  // ---------------------------------------------------------------- EX ----
  logic        ex_v;
  dec_t        ex_d;
  logic [31:0] ex_a, ex_b, ex_pc, ex_pc4;
  logic [31:0] a_fwd, b_fwd, alu_a, alu_b, alu_y, hi, lo, ex_res;
  logic        br_taken;

  // Memory-stage view (the EX signals themselves with three or four stages).
  logic        m_v, m_load, m_store, m_we;
  logic [4:0]  m_wa;
  logic [31:0] m_addr, m_wdata, m_res;
  logic        m_fwd_a, m_fwd_b;      // M result bypassed to EX

  always_comb begin
    if (m_fwd_a)                                 a_fwd = m_res;
    else if (wb_v && wb_we && wb_wa == ex_d.rs)  a_fwd = wb_val;
    else                                         a_fwd = ex_a;
    if (m_fwd_b)                                 b_fwd = m_res;
    else if (wb_v && wb_we && wb_wa == ex_d.rt)  b_fwd = wb_val;
    else                                         b_fwd = ex_b;
  end

  assign alu_a = ex_d.a_shamt ? {27'b0, ex_d.shamt} : a_fwd;
  assign alu_b = ex_d.b_imm ? ex_d.imm : b_fwd;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex_v  <= 1'b0;
      ex_d  <= '0;
      ex_a  <= '0;
      ex_b  <= '0;
      ex_pc <= '0;
    end else if (!hold) begin
      ex_v  <= v_dc;
      ex_d  <= dec;
      ex_a  <= rf_rd1;
      ex_b  <= rf_rd2;
      ex_pc <= pc_dc;
    end else begin
      ex_a  <= a_fwd;                  // keep the bypassed value while waiting
      ex_b  <= b_fwd;
    end
  end

  alu u_alu (
    .op (ex_d.alu_op),
    .a  (alu_a),
    .b  (alu_b),
    .y  (alu_y)
  );

  mul_unit u_mul (
    .clk       (clk),
    .rst       (rst),
    .start     (ex_v && ex_d.mul && !hold),
    .is_signed (ex_d.mul_signed),
    .a         (a_fwd),
    .b         (b_fwd),
    .hi        (hi),
    .lo        (lo)
  );

  always_comb begin
    unique case (ex_d.br)
      BR_EQ:   br_taken = (a_fwd == b_fwd);
      BR_NE:   br_taken = (a_fwd != b_fwd);
      BR_LEZ:  br_taken = $signed(a_fwd) <= 0;
      BR_GTZ:  br_taken = $signed(a_fwd) > 0;
      BR_LTZ:  br_taken = a_fwd[31];
      BR_GEZ:  br_taken = !a_fwd[31];
      default: br_taken = 1'b0;
    endcase
  end

  assign redirect = ex_v && (br_taken || ex_d.jump || ex_d.jreg) && !hold;
  assign taken    = redirect;
  assign ex_pc4   = ex_pc + 32'd4;

  always_comb begin
    if (ex_d.jreg)      target = a_fwd;
    else if (ex_d.jump) target = {ex_pc4[31:28], ex_d.jidx, 2'b00};
    else                target = ex_pc4 + {ex_d.imm[29:0], 2'b00};
  end

  always_comb begin
    unique case (ex_d.res)
      RES_LINK: ex_res = ex_pc + 32'd8;
      RES_HI:   ex_res = hi;
      RES_LO:   ex_res = lo;
      default:  ex_res = alu_y;
    endcase
  end

  // ----------------------------------------------------------------- M ----
  if (STAGES == 5) begin : g_m
    always_ff @(posedge clk) begin
      if (rst) begin
        m_v     <= 1'b0;
        m_load  <= 1'b0;
        m_store <= 1'b0;
        m_we    <= 1'b0;
        m_wa    <= '0;
        m_addr  <= '0;
        m_wdata <= '0;
        m_res   <= '0;
      end else if (!fifo_stall) begin
        m_v     <= ex_v && !lu_stall;  // bubble behind a load-use wait
        m_load  <= ex_d.load;
        m_store <= ex_d.store;
        m_we    <= ex_d.we;
        m_wa    <= ex_d.wa;
        m_addr  <= alu_y;
        m_wdata <= b_fwd;
        m_res   <= ex_res;
      end
    end
    assign m_fwd_a  = m_v && m_we && !m_load && m_wa == ex_d.rs;
    assign m_fwd_b  = m_v && m_we && !m_load && m_wa == ex_d.rt;
    // Conservative: rs and rt are compared whether or not EX reads them.
    assign lu_stall = ex_v && m_v && m_load && m_we && (m_wa == ex_d.rs || m_wa == ex_d.rt);
  end else begin : g_exm
    assign m_v      = ex_v;
    assign m_load   = ex_d.load;
    assign m_store  = ex_d.store;
    assign m_we     = ex_d.we;
    assign m_wa     = ex_d.wa;
    assign m_addr   = alu_y;
    assign m_wdata  = b_fwd;
    assign m_res    = ex_res;
    assign m_fwd_a  = 1'b0;
    assign m_fwd_b  = 1'b0;
    assign lu_stall = 1'b0;
  end

  logic        fifo_sel;
  logic [31:0] fifo_rdata;

  fifo_io #(.NPORT(NPORT)) u_fio (
    .valid    (m_v),
    .load     (m_load),
    .store    (m_store),
    .addr     (m_addr),
    .wdata    (m_wdata),
    .is_fifo  (fifo_sel),
    .stall    (fifo_stall),
    .rdata    (fifo_rdata),
    .in_empty (in_empty),
    .in_data  (in_data),
    .in_pop   (in_pop),
    .out_full (out_full),
    .out_data (out_data),
    .out_push (out_push)
  );

  logic [31:0]    dmem_rdata;
  logic           dmem_we;
  logic [DAW-1:0] dmem_waddr;
  logic [31:0]    dmem_wdata;

  always_comb begin
    if (ld_we && !ld_imem) begin
      dmem_we    = 1'b1;
      dmem_waddr = ld_addr[DAW-1:0];
      dmem_wdata = ld_data;
    end else begin
      dmem_we    = m_v && m_store && !fifo_sel;
      dmem_waddr = m_addr[DAW+1:2];
      dmem_wdata = m_wdata;
    end
  end

  local_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .re    (m_v && m_load && !fifo_sel),
    .raddr (m_addr[DAW+1:2]),
    .rdata (dmem_rdata),
    .we    (dmem_we),
    .waddr (dmem_waddr),
    .wdata (dmem_wdata)
  );

  // --------------------------------------------------------------- WB -----
  logic [31:0] wb_res;
  logic        wb_from_dmem;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_v         <= 1'b0;
      wb_we        <= 1'b0;
      wb_wa        <= '0;
      wb_res       <= '0;
      wb_from_dmem <= 1'b0;
    end else begin
      wb_v         <= m_v && !fifo_stall;
      wb_we        <= m_we;
      wb_wa        <= m_wa;
      wb_res       <= (m_load && fifo_sel) ? fifo_rdata : m_res;
      wb_from_dmem <= m_load && !fifo_sel;
    end
  end

  assign wb_val = wb_from_dmem ? dmem_rdata : wb_res;
  assign retire = wb_v;

  initial assert (STAGES >= 3 && STAGES <= 5) else $error("soft_cpu: STAGES must be 3, 4 or 5");
endmodule
