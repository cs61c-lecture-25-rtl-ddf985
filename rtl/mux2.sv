// Two-input multiplexer, N bits wide.
//
// y = a when sel is 0, y = b when sel is 1; combinational. The ports follow
// the MUX building block (Select, A, B, Y, 32 bits). Which input Select = 1
// picks is this design's convention. Used for the PC source, the register
// write address, the ALU B operand, the write-back source and the
// instruction-memory address.
module mux2 #(
  parameter int unsigned N = 32
) (
  input  logic         sel,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
