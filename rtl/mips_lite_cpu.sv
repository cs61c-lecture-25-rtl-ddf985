// MIPS-lite single-cycle CPU (top level).
//
// Executes addu, subu, ori, lw, sw and beq, one instruction per clock cycle.
// Within a cycle the instruction fetched at the PC is decoded by the
// controller; rs and rt are read from the register file; the ALU combines
// busA with busB or with the extended immediate; lw reads and sw writes the
// data memory at the ALU result; and on the rising edge the result (ALU or
// memory) is written to rd or rt, a store is written to memory and the PC
// moves to PC+4 or to the beq target. Instruction and data memories are
// separate.
//
// Interface: clk, rst_n (synchronous, active low: PC and registers to 0),
// a program-load port into the instruction memory (imem_we/imem_waddr/
// imem_wdata; the PC holds while it is used), and observation outputs for
// the PC, the instruction and the register-file and data-memory writes of
// the current cycle. The memory sizes, the load port and the observation
// outputs are this design's choices.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            imem_we,
  input  logic [XLEN-1:0] imem_waddr,
  input  logic [XLEN-1:0] imem_wdata,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instr,
  output logic            reg_we,
  output logic [4:0]      reg_waddr,
  output logic [XLEN-1:0] reg_wdata,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata
);

  rtype_t          f;
  ctrl_t           ctrl;
  logic            zero;
  logic [4:0]      rw;
  logic [XLEN-1:0] busa, busb, busw;
  logic [XLEN-1:0] imm32, alu_b, alu_result, dmem_dout;

  always_comb f = instr;

  ifetch #(.IMEM_WORDS(IMEM_WORDS)) u_ifetch (
    .clk(clk), .rst_n(rst_n), .branch(ctrl.branch), .zero(zero),
    .load_we(imem_we), .load_addr(imem_waddr), .load_data(imem_wdata),
    .pc(pc), .instr(instr)
  );

  control u_control (.op(f.op), .funct(f.funct), .ctrl(ctrl));

  // No register or memory writes while a program is being loaded
  logic reg_wr_q, mem_wr_q;
  always_comb begin
    reg_wr_q = ctrl.reg_wr & !imem_we;
    mem_wr_q = ctrl.mem_wr & !imem_we;
  end

  mux2 #(.N(5)) u_rw_mux (.sel(ctrl.reg_dst), .a(f.rt), .b(f.rd), .y(rw));

  regfile #(.NREGS(32), .WIDTH(XLEN)) u_regfile (
    .clk(clk), .rst_n(rst_n), .we(reg_wr_q),
    .ra(f.rs), .rb(f.rt), .rw(rw), .busw(busw),
    .busa(busa), .busb(busb)
  );

  extender u_ext (.imm16(instr[15:0]), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.N(XLEN)) u_alusrc_mux (.sel(ctrl.alu_src), .a(busb), .b(imm32), .y(alu_b));

  alu u_alu (.a(busa), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_result), .zero(zero));

  ideal_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(mem_wr_q), .addr(alu_result), .din(busb), .dout(dmem_dout)
  );

  mux2 #(.N(XLEN)) u_wb_mux (.sel(ctrl.mem_to_reg), .a(alu_result), .b(dmem_dout), .y(busw));

  always_comb begin
    reg_we    = reg_wr_q;
    reg_waddr = rw;
    reg_wdata = busw;
    mem_we    = mem_wr_q;
    mem_addr  = alu_result;
    mem_wdata = busb;
  end

endmodule
