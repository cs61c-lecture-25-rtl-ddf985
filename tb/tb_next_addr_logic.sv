// Self-checking testbench for next_addr_logic: random PCs and offsets with
// every combination of branch and zero; next PC compared with PC+4 or
// PC+4+4*offset.
module tb_next_addr_logic;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] pc, next_pc, exp;
  logic [15:0] imm;
  logic        branch, zero;

  next_addr_logic dut (.pc(pc), .imm16(imm), .branch(branch), .zero(zero), .next_pc(next_pc));

  initial begin
    repeat (3000) begin
      pc = {$urandom, 2'b00}; imm = 16'($urandom); branch = 1'($urandom); zero = 1'($urandom);
      #1;
      exp = pc + 32'd4;
      if (branch && zero) exp = exp + 32'(32'($signed(imm)) * 4);
      checks++;
      if (next_pc !== exp) begin
        failures++;
        $display("FAIL pc=%h imm=%h br=%b z=%b got %h exp %h", pc, imm, branch, zero, next_pc, exp);
      end
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
