// Self-checking testbench for mux2: random data on both inputs, both
// select values, output compared with the expected input.
module tb_mux2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        sel;
  logic [31:0] a, b, y;

  mux2 #(.N(32)) dut (.sel(sel), .a(a), .b(b), .y(y));

  initial begin
    repeat (1000) begin
      a = $urandom; b = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
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
