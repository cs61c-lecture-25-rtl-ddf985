// Adder: N-bit binary adder with carry in and carry out.
//
// sum/carry_out = a + b + carry_in, purely combinational. The ports follow
// the adder building block of the datapath (A, B, CarryIn, Sum, CarryOut,
// 32 bits wide). It serves the ALU (add and subtract) and the next-address
// logic (PC+4 and branch target). The adder's internal structure is left to
// synthesis.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         carry_in,
  output logic [N-1:0] sum,
  output logic         carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, carry_in};
  end

endmodule
