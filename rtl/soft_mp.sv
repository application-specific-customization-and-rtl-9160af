// soft_mp: application-specific soft multiprocessor.
//
// NPROC soft_cpu processors, each with its own program in local memory,
// communicate only through unidirectional circular FIFOs (fifo). Which
// FIFOs exist is given by the link table LINKS (NLINK entries): each entry
// joins output port `sport` of processor `src` to input port `dport` of
// processor `dst`. A processor reaches its ports with loads and stores in the
// FIFO address window (see fifo_io), so one table describes either topology
// the design supports:
//   - mesh: processors on an X x Y grid, each with at most eight FIFOs to its
//     North, South, East and West neighbours; data for a distant processor is
//     forwarded hop by hop by the programs of the processors in between
//     (smp_pkg::mesh_table builds this table; it is the default);
//   - point-to-point: one FIFO straight from every producer to every consumer
//     of its data, so some processors have many ports and some only one.
// Processor number smp_pkg::EXT in a link stands for the host: a link from EXT
// is fed by ext_in[sport], a link to EXT drains into ext_out[dport]
// (valid/ready handshakes). Input or output ports that no link uses read as
// always empty (a load from one waits forever) and never full (a store to one
// is dropped).
//
// Each processor may have its own instruction subset (ISA_MASKS[p]) and its
// own pipeline depth (CPU_STAGES[p], 3, 4 or 5; by default every processor
// takes STAGES). All FIFOs share the depth FIFO_DEPTH. Processors of
// different depths interwork without change, since they meet only at FIFOs.
//
// Loading: hold rst high, write every processor's memories through
// ld_we/ld_imem/ld_proc/ld_addr/ld_data, then release rst; all processors
// start at address 0 in the same cycle.
//
// Status: per-processor retire/stall/taken pulses from soft_cpu.
//
// From the document: processors joined only by unidirectional FIFOs, mesh
// and point-to-point topologies, at most eight FIFOs per mesh processor,
// per-processor instruction subsets, 16 processors, 4-word FIFOs, pipeline
// depth chosen per processor. This design's own: the link-table form, host
// streams, the load port and the default mesh with host I/O at the two
// corners.
module soft_mp
  import smp_pkg::*;
#(
  parameter int unsigned NPROC      = 16,
  parameter int unsigned STAGES     = 4,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned NPORT      = MAX_PORTS,
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 2048,
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned NLINK      = mesh_nlinks(MESH_X, MESH_Y),
  parameter link_table_t LINKS      = mesh_table(MESH_X, MESH_Y, 0, MESH_X * MESH_Y - 1),
  parameter int unsigned N_EXT_IN   = 1,
  parameter int unsigned N_EXT_OUT  = 1,
  parameter isa_mask_t [NPROC-1:0] ISA_MASKS = {NPROC{ISA_ALL}},
  parameter logic [NPROC-1:0][2:0] CPU_STAGES = {NPROC{3'(STAGES)}}
) (
  input  logic              clk,
  input  logic              rst,
  // memory load port
  input  logic              ld_we,
  input  logic              ld_imem,
  input  logic [7:0]        ld_proc,
  input  logic [15:0]       ld_addr,
  input  logic [31:0]       ld_data,
  // host input streams
  input  logic [N_EXT_IN-1:0]  ext_in_valid,
  input  logic [31:0]          ext_in_data [N_EXT_IN],
  output logic [N_EXT_IN-1:0]  ext_in_ready,
  // host output streams
  output logic [N_EXT_OUT-1:0] ext_out_valid,
  output logic [31:0]          ext_out_data [N_EXT_OUT],
  input  logic [N_EXT_OUT-1:0] ext_out_ready,
  // status
  output logic [NPROC-1:0]  cpu_retire,
  output logic [NPROC-1:0]  cpu_stall,
  output logic [NPROC-1:0]  cpu_taken
);
  // Per-processor port bundles.
  logic [NPORT-1:0] in_empty [NPROC];
  logic [31:0]      in_data  [NPROC][NPORT];
  logic [NPORT-1:0] in_pop   [NPROC];
  logic [NPORT-1:0] out_full [NPROC];
  logic [31:0]      out_data [NPROC];
  logic [NPORT-1:0] out_push [NPROC];

  // Per-link FIFO signals.
  logic             l_push  [NLINK];
  logic [31:0]      l_wdata [NLINK];
  logic             l_full  [NLINK];
  logic             l_pop   [NLINK];
  logic [31:0]      l_rdata [NLINK];
  logic             l_empty [NLINK];

  // ------------------------------------------------------------ processors --
  for (genvar p = 0; p < NPROC; p++) begin : g_cpu
    soft_cpu #(
      .STAGES     (int'(CPU_STAGES[p])),
      .NPORT      (NPORT),
      .IMEM_WORDS (IMEM_WORDS),
      .DMEM_WORDS (DMEM_WORDS),
      .ISA_EN     (ISA_MASKS[p])
    ) u_cpu (
      .clk      (clk),
      .rst      (rst),
      .ld_we    (ld_we && ld_proc == 8'(p)),
      .ld_imem  (ld_imem),
      .ld_addr  (ld_addr),
      .ld_data  (ld_data),
      .in_empty (in_empty[p]),
      .in_data  (in_data[p]),
      .in_pop   (in_pop[p]),
      .out_full (out_full[p]),
      .out_data (out_data[p]),
      .out_push (out_push[p]),
      .retire   (cpu_retire[p]),
      .stall    (cpu_stall[p]),
      .taken    (cpu_taken[p])
    );

    // Consumer side of the links that end at this processor.
    always_comb begin
      in_empty[p] = '1;
      for (int k = 0; k < NPORT; k++) in_data[p][k] = '0;
      for (int l = 0; l < NLINK; l++) begin
        if (LINKS[l].dst == 8'(p) && LINKS[l].dport < 8'(NPORT)) begin
          in_empty[p][LINKS[l].dport[PORT_BITS-1:0]] = l_empty[l];
          in_data[p][LINKS[l].dport[PORT_BITS-1:0]]  = l_rdata[l];
        end
      end
    end

    // Producer side of the links that start at this processor.
    always_comb begin
      out_full[p] = '0;
      for (int l = 0; l < NLINK; l++) begin
        if (LINKS[l].src == 8'(p) && LINKS[l].sport < 8'(NPORT))
          out_full[p][LINKS[l].sport[PORT_BITS-1:0]] = l_full[l];
      end
    end
  end

  // ----------------------------------------------------------------- links --
  for (genvar l = 0; l < NLINK; l++) begin : g_link
    localparam link_t L = LINKS[l];

    if (L.src == EXT) begin : g_src_ext
      assign l_push[l]  = ext_in_valid[L.sport];
      assign l_wdata[l] = ext_in_data[L.sport];
    end else begin : g_src_cpu
      assign l_push[l]  = out_push[L.src][L.sport];
      assign l_wdata[l] = out_data[L.src];
    end

    if (L.dst == EXT) begin : g_dst_ext
      assign l_pop[l] = ext_out_ready[L.dport] && !l_empty[l];
    end else begin : g_dst_cpu
      assign l_pop[l] = in_pop[L.dst][L.dport];
    end

    fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk   (clk),
      .rst   (rst),
      .push  (l_push[l]),
      .wdata (l_wdata[l]),
      .full  (l_full[l]),
      .pop   (l_pop[l]),
      .rdata (l_rdata[l]),
      .empty (l_empty[l])
    );
  end

  // ------------------------------------------------------------ host side --
  always_comb begin
    ext_in_ready = '0;
    for (int l = 0; l < NLINK; l++)
      if (LINKS[l].src == EXT && LINKS[l].sport < 8'(N_EXT_IN))
        ext_in_ready[LINKS[l].sport[$clog2(N_EXT_IN+1)-1:0]] = !l_full[l];
  end

  always_comb begin
    ext_out_valid = '0;
    for (int j = 0; j < N_EXT_OUT; j++) ext_out_data[j] = '0;
    for (int l = 0; l < NLINK; l++)
      if (LINKS[l].dst == EXT && LINKS[l].dport < 8'(N_EXT_OUT)) begin
        ext_out_valid[LINKS[l].dport[$clog2(N_EXT_OUT+1)-1:0]] = !l_empty[l];
        ext_out_data[LINKS[l].dport[$clog2(N_EXT_OUT+1)-1:0]]  = l_rdata[l];
      end
  end

  // A host input stream is only pushed when the FIFO can take the word.
  for (genvar i = 0; i < N_EXT_IN; i++) begin : g_ext_chk
    a_ext_in_hs: assert property (@(posedge clk) disable iff (rst)
                                  ext_in_valid[i] |-> ext_in_ready[i]);
  end
endmodule
