// Shared types and constants of the MIPS-lite single-cycle CPU.
//
// The instruction subset is addu, subu, ori, lw, sw and beq. The field
// layout (op[31:26], rs[25:21], rt[20:16], rd[15:11], shamt[10:6],
// funct[5:0], imm16[15:0]) is the standard MIPS one. The numeric opcode and
// funct values below are the standard MIPS-I encodings; the ALU control code
// and the control-point struct are this design's own choice.
package mips_lite_pkg;

  localparam int unsigned XLEN = 32;

  // Primary opcodes, instr[31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // funct field of R-type instructions, instr[5:0]
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } alu_ctr_e;

  // Control points driven by the controller into the datapath
  typedef struct packed {
    logic     reg_dst;     // 1: write rd, 0: write rt
    logic     alu_src;     // 1: ALU B operand is the extended immediate, 0: busB
    logic     mem_to_reg;  // 1: busW from data memory, 0: from ALU
    logic     reg_wr;      // register file write enable (RegWr)
    logic     mem_wr;      // data memory write enable
    logic     branch;      // instruction is beq
    logic     ext_op;      // 1: sign-extend imm16, 0: zero-extend
    alu_ctr_e alu_ctr;     // ALU operation (ALUctr)
  } ctrl_t;

  // Instruction fields
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

endpackage
