// Extender: widens the 16-bit immediate to 32 bits.
//
// ext_op = 1 copies imm16[15] into the upper 16 bits (sign extension, used
// by lw, sw and beq); ext_op = 0 fills them with zeros (zero extension, used
// by ori). Combinational.
module extender
  import mips_lite_pkg::*;
(
  input  logic [15:0]     imm16,
  input  logic            ext_op,
  output logic [XLEN-1:0] imm32
);

  always_comb imm32 = {{(XLEN-16){ext_op & imm16[15]}}, imm16};

endmodule
