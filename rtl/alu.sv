// ALU of the MIPS-lite CPU: add, subtract and OR, with a zero flag.
//
// alu_ctr selects the operation (ALU_ADD, ALU_SUB, ALU_OR from
// mips_lite_pkg). Add and subtract share one adder: subtraction is
// a + ~b + 1. zero is 1 when the result is 0; beq subtracts its two register
// operands and branches on zero, which gives the equality test. Operations
// are unsigned (addu, subu), so no overflow is flagged. Combinational; the
// operation set follows the instruction subset, the encoding of alu_ctr and
// the shared-adder structure are this design's choice.
module alu
  import mips_lite_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_ctr_e        alu_ctr,
  output logic [XLEN-1:0] result,
  output logic            zero
);

  logic            sub;
  logic [XLEN-1:0] b_eff;
  logic [XLEN-1:0] sum;
  logic            carry_out;  // unused: unsigned operations ignore the carry

  always_comb begin
    sub   = (alu_ctr == ALU_SUB);
    b_eff = sub ? ~b : b;
  end

  adder #(.N(XLEN)) u_adder (
    .a        (a),
    .b        (b_eff),
    .carry_in (sub),
    .sum      (sum),
    .carry_out(carry_out)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      default:          result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
