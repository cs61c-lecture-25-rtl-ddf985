// Controller (main decoder) of the MIPS-lite single-cycle CPU.
//
// Combinationally decodes the opcode and funct fields into the datapath
// control points (ctrl_t in mips_lite_pkg). The settings follow from each
// instruction's register transfer:
//   addu/subu  rd <- rs +/- rt        reg_dst, reg_wr, ALU add/sub
//   ori        rt <- rs | zext(imm)   alu_src, reg_wr, ALU or, zero-extend
//   lw         rt <- MEM[rs+sext(imm)] alu_src, mem_to_reg, reg_wr, add, sign-extend
//   sw         MEM[rs+sext(imm)] <- rt alu_src, mem_wr, add, sign-extend
//   beq        branch if rs == rt     branch, ALU subtract (zero = equal)
// Any other opcode or funct decodes as a no-operation: nothing is written
// and the PC advances by 4. Names other than RegWr and ALUctr, the encoding
// and the no-op rule are this design's choice.
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
             mem_wr: 1'b0, branch: 1'b0, ext_op: 1'b0, alu_ctr: ALU_ADD};
    case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op  = 1'b1;
        ctrl.branch  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      default: ;
    endcase
  end

endmodule
