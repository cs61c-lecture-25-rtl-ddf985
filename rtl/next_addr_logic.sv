// Next-address logic of the instruction fetch unit.
//
// Computes the PC of the next instruction, combinationally:
//   next_pc = PC + 4                              normally
//   next_pc = PC + 4 + (sign_ext(imm16) || 00)    when branch and zero
// branch marks a beq and zero is the ALU's equality result. One adder forms
// PC+4, a second adds the shifted, sign-extended offset, and a multiplexer
// picks between them. The register transfer comes from the beq definition;
// the two-adder structure is this design's choice.
module next_addr_logic
  import mips_lite_pkg::*;
(
  input  logic [XLEN-1:0] pc,
  input  logic [15:0]     imm16,
  input  logic            branch,
  input  logic            zero,
  output logic [XLEN-1:0] next_pc
);

  logic [XLEN-1:0] pc_plus4;
  logic [XLEN-1:0] offset;
  logic [XLEN-1:0] target;
  logic            take;
  logic            co_inc;  // unused carry outputs: addresses wrap modulo 2^32
  logic            co_br;

  always_comb begin
    offset = {{(XLEN-18){imm16[15]}}, imm16, 2'b00};
    take   = branch & zero;
  end

  adder #(.N(XLEN)) u_inc (
    .a(pc), .b(XLEN'(4)), .carry_in(1'b0), .sum(pc_plus4), .carry_out(co_inc)
  );

  adder #(.N(XLEN)) u_br (
    .a(pc_plus4), .b(offset), .carry_in(1'b0), .sum(target), .carry_out(co_br)
  );

  mux2 #(.N(XLEN)) u_sel (
    .sel(take), .a(pc_plus4), .b(target), .y(next_pc)
  );

endmodule
