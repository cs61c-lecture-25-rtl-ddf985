// Self-checking testbench for alu: add, subtract and OR on random and
// equal operands; result and zero flag compared with a reference.
module tb_alu;
  import mips_lite_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b, result, exp;
  alu_ctr_e    op;
  logic        zero;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(result), .zero(zero));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e top);
    a = ta; b = tb_; op = top;
    #1;
    case (top)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h z=%b exp %h", top, ta, tb_, result, zero, exp);
    end
  endtask

  initial begin
    logic [31:0] r;
    check_one(32'h0, 32'h0, ALU_OR);
    check_one(32'h5, 32'h5, ALU_SUB);
    check_one(32'h0, 32'h1, ALU_SUB);
    check_one(32'hFFFF_FFFF, 32'h1, ALU_ADD);
    repeat (3000) begin
      r = $urandom;
      case ($urandom_range(0, 3))
        0: check_one(r, $urandom, ALU_ADD);
        1: check_one(r, $urandom, ALU_SUB);
        2: check_one(r, r, ALU_SUB);
        default: check_one(r, $urandom, ALU_OR);
      endcase
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
