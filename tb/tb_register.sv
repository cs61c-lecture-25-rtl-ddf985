// Self-checking testbench for register: reset value, then random data and
// write enables; the output must change only after a rising edge with the
// write enable set.
module tb_register;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [31:0] RV = 32'h0040_0000;
  logic        rst_n, we;
  logic [31:0] d, q, model;

  register #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  task automatic chk(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%h exp %h", what, q, model);
    end
  endtask

  initial begin
    rst_n = 0; we = 1; d = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    model = RV;
    chk("reset");
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      we = 1'($urandom); d = $urandom;
      #1 chk("no change before edge");
      @(posedge clk); #1;
      if (we) model = d;
      chk("after edge");
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
