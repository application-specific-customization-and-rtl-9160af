// fifo_io: memory-mapped FIFO port unit of a processor's execute/memory stage.
//
// A load or store whose address has bit 31 set (smp_pkg::FIFO_BASE window)
// goes to a FIFO port instead of the data memory; address bits [2 +: PORT_BITS]
// select one of NPORT input ports (loads) or output ports (stores). The FIFO's
// empty or full flag is examined in the same cycle as the access: if the
// access can complete, the pop or push strobe of that port is raised and the
// access takes one cycle; otherwise `stall` is raised, no strobe is given, and
// the pipeline repeats the access next cycle. Store data is broadcast to all
// output ports; only the selected one is pushed. Popped data is returned on
// `rdata` in the same cycle. Purely combinational.
//
// Single-cycle access and retry on empty/full follow the document; the address
// window and port numbering are this design's own choices.
module fifo_io
  import smp_pkg::*;
#(
  parameter int unsigned NPORT = MAX_PORTS
) (
  input  logic              valid,      // an instruction occupies the stage
  input  logic              load,
  input  logic              store,
  input  logic [31:0]       addr,
  input  logic [31:0]       wdata,
  output logic              is_fifo,    // access goes to a FIFO port
  output logic              stall,      // access cannot complete this cycle
  output logic [31:0]       rdata,
  // input (consumer) side of NPORT FIFOs
  input  logic [NPORT-1:0]  in_empty,
  input  logic [31:0]       in_data [NPORT],
  output logic [NPORT-1:0]  in_pop,
  // output (producer) side of NPORT FIFOs
  input  logic [NPORT-1:0]  out_full,
  output logic [31:0]       out_data,
  output logic [NPORT-1:0]  out_push
);
  localparam int unsigned PW = (NPORT > 1) ? $clog2(NPORT) : 1;

  logic [PW-1:0] port;
  logic          rd, wr;

  assign port     = addr[2 +: PW];
  assign is_fifo  = addr[31];
  assign rd       = valid && load && is_fifo;
  assign wr       = valid && store && is_fifo;
  assign stall    = (rd && in_empty[port]) || (wr && out_full[port]);
  assign rdata    = in_data[port];
  assign out_data = wdata;

  always_comb begin
    in_pop   = '0;
    out_push = '0;
    if (rd && !in_empty[port]) in_pop[port]   = 1'b1;
    if (wr && !out_full[port]) out_push[port] = 1'b1;
  end
endmodule
