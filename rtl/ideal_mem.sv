// Idealized memory: WORDS words of 32 bits, one address, Data In, Data Out.
//
// The address is a byte address; bits [1:0] are ignored (word access only)
// and the bits above the word index are ignored, so addresses wrap around
// the memory. Reads are combinational: dout follows addr. When we is 1 the
// word at addr takes din on the rising clock edge. There is no reset; the
// contents are whatever was written. The same module serves as instruction
// memory and as data memory. The size is this design's choice.
module ideal_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  always_comb idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= din;
  end

  always_comb dout = mem[idx];

endmodule
