// Register: N-bit storage element with write enable.
//
// On a rising clock edge Data Out (q) takes Data In (d) when we is 1 and
// keeps its value when we is 0, as in a D flip-flop with an enable. The
// synchronous active-low reset to RESET_VALUE is this design's addition, so
// that the PC starts at a known address.
module register #(
  parameter int unsigned  N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
