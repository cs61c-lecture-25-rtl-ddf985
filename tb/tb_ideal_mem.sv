// Self-checking testbench for ideal_mem: fills every word through byte
// addresses, then random reads and writes (with random low and high address
// bits) against a model; reads are combinational, writes need we and an edge.
module tb_ideal_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WORDS = 256;
  logic        we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];

  ideal_mem #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  function automatic int widx(input logic [31:0] a);
    return int'(a[9:2]);
  endfunction

  task automatic chk();
    checks++;
    if (dout !== model[widx(addr)]) begin
      failures++;
      $display("FAIL addr=%h dout=%h exp %h", addr, dout, model[widx(addr)]);
    end
  endtask

  initial begin
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); din = $urandom;
      @(posedge clk); #1;
      model[i] = din;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(i * 4); #1 chk();
    end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); addr = $urandom; din = $urandom;
      #1 chk();
      @(posedge clk); #1;
      if (we) model[widx(addr)] = din;
      chk();
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
