// Self-checking testbench for extender: every 16-bit immediate, zero and
// sign extension, compared with the expected 32-bit value.
module tb_extender;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] out, exp;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(out));

  initial begin
    for (int i = 0; i < 65536; i += 7) begin
      for (int s = 0; s < 2; s++) begin
        imm = 16'(i); ext_op = s[0];
        #1;
        exp = ext_op ? 32'($signed(imm)) : {16'h0, imm};
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL imm=%h ext=%b got %h exp %h", imm, ext_op, out, exp);
        end
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
