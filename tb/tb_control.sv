// Self-checking testbench for control: every opcode with the two R-type
// funct codes and random funct values; each control point compared with a
// table written from the instructions' register transfers.
module tb_control;
  import mips_lite_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] op, funct;
  ctrl_t      ctrl, exp;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  // expected: {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, branch, ext_op}, alu op
  function automatic ctrl_t expect_ctrl(input logic [5:0] o, input logic [5:0] fn);
    ctrl_t c;
    c = '0;
    c.alu_ctr = ALU_ADD;
    if (o == 6'h00 && fn == 6'h21) begin c.reg_dst = 1; c.reg_wr = 1; end
    else if (o == 6'h00 && fn == 6'h23) begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = ALU_SUB; end
    else if (o == 6'h0D) begin c.alu_src = 1; c.reg_wr = 1; c.alu_ctr = ALU_OR; end
    else if (o == 6'h23) begin c.alu_src = 1; c.ext_op = 1; c.mem_to_reg = 1; c.reg_wr = 1; end
    else if (o == 6'h2B) begin c.alu_src = 1; c.ext_op = 1; c.mem_wr = 1; end
    else if (o == 6'h04) begin c.ext_op = 1; c.branch = 1; c.alu_ctr = ALU_SUB; end
    return c;
  endfunction

  task automatic chk(input logic [5:0] o, input logic [5:0] fn);
    op = o; funct = fn;
    #1;
    exp = expect_ctrl(o, fn);
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL op=%h funct=%h got %b exp %b", o, fn, ctrl, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 64; o++) begin
      chk(6'(o), 6'h21);
      chk(6'(o), 6'h23);
      repeat (4) chk(6'(o), 6'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
