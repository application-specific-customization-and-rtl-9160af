// mul_unit: single-cycle integer multiplier with the MIPS HI/LO registers.
//
// When `start` is high at a clock edge the 64-bit product of a and b (signed
// or unsigned) is written, upper half to HI and lower half to LO. HI and LO
// are readable at all times (MFHI/MFLO). The product is formed in one cycle,
// so an MFHI/MFLO right after MULT sees the result without a stall. Reset
// clears HI and LO.
//
// The document names the integer multiplier and places it on the critical path
// of the deeper pipelines; the single-cycle organisation is this design's own.
module mul_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        is_signed,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [63:0] prod;

  always_comb begin
    if (is_signed) prod = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
    else           prod = {32'b0, a} * {32'b0, b};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi <= '0;
      lo <= '0;
    end else if (start) begin
      hi <= prod[63:32];
      lo <= prod[31:0];
    end
  end
endmodule
