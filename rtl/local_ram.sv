// local_ram: a processor's local on-chip memory (instruction or data).
//
// WORDS x 32-bit words, one synchronous read port and one synchronous write
// port, so it maps onto an FPGA block RAM. Read data appears the cycle after
// the address is presented with `re` high and holds while `re` is low. A read
// and a write of the same word in one cycle return the old contents.
// Addresses are word addresses. The contents are not reset; they are loaded
// through the write port.
//
// The document says each processor has local on-chip instruction and data
// memories; their size and port organisation are this design's own choices.
module local_ram #(
  parameter int unsigned WORDS = 2048
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
