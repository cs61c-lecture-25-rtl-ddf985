// Instruction fetch unit: PC register, next-address logic, instruction memory.
//
// Each cycle the instruction memory returns the word at the PC
// (combinationally), and on the rising clock edge the PC takes the value
// from the next-address logic: PC+4, or the beq target when branch and zero
// are both 1. branch and zero come from the controller and the ALU in the
// same cycle. The imm16 branch offset is taken from the fetched instruction.
//
// Program loading (this design's addition, since the memory must be filled
// somehow): while load_we is 1 the memory address is load_addr, load_data is
// written there, and the PC holds. Reset sets the PC to 0.
module ifetch
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            branch,
  input  logic            zero,
  input  logic            load_we,
  input  logic [XLEN-1:0] load_addr,
  input  logic [XLEN-1:0] load_data,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instr
);

  logic [XLEN-1:0] next_pc;
  logic [XLEN-1:0] mem_addr;

  register #(.N(XLEN), .RESET_VALUE('0)) u_pc (
    .clk(clk), .rst_n(rst_n), .we(!load_we), .d(next_pc), .q(pc)
  );

  next_addr_logic u_nal (
    .pc(pc), .imm16(instr[15:0]), .branch(branch), .zero(zero), .next_pc(next_pc)
  );

  mux2 #(.N(XLEN)) u_addr_mux (
    .sel(load_we), .a(pc), .b(load_addr), .y(mem_addr)
  );

  ideal_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(load_we), .addr(mem_addr), .din(load_data), .dout(instr)
  );

endmodule
