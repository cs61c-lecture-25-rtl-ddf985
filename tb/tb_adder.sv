// Self-checking testbench for adder: random and corner-case operands,
// sum and carry out compared with 33-bit arithmetic.
module tb_adder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b, sum;
  logic        cin, cout;
  logic [32:0] exp;

  adder #(.N(32)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc;
    #1;
    exp = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", ta, tb_, tc, cout, sum, exp);
    end
  endtask

  initial begin
    check_one(32'hFFFF_FFFF, 32'h0, 1'b1);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check_one(32'h0, 32'h0, 1'b0);
    check_one(32'h7FFF_FFFF, 32'h1, 1'b0);
    repeat (2000) check_one($urandom, $urandom, 1'($urandom));
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
