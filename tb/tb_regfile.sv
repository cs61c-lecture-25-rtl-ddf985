// Self-checking testbench for regfile: reset clears all registers, then
// random writes and reads on both ports against a model; register 0 must
// stay zero, and a read in the write cycle returns the old value.
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];

  regfile dut (.clk(clk), .rst_n(rst_n), .we(we), .ra(ra), .rb(rb), .rw(rw),
               .busw(busw), .busa(busa), .busb(busb));

  task automatic chk_reads();
    checks++;
    if (busa !== model[ra] || busb !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d busa=%h exp %h rb=%0d busb=%h exp %h",
               ra, busa, model[ra], rb, busb, model[rb]);
    end
  endtask

  initial begin
    int zero_writes = 0;
    rst_n = 0; we = 0; ra = 0; rb = 0; rw = 0; busw = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1 chk_reads();
    end
    repeat (3000) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      rw = ($urandom_range(0, 15) == 0) ? 5'd0 : 5'($urandom);
      busw = $urandom;
      ra = ($urandom_range(0, 3) == 0) ? rw : 5'($urandom);
      rb = 5'($urandom);
      #1 chk_reads();
      @(posedge clk); #1;
      if (we && rw == 0) zero_writes++;
      if (we && rw != 0) model[rw] = busw;
      chk_reads();
    end
    checks++;
    if (zero_writes == 0) begin
      failures++;
      $display("FAIL no write to register 0 was tried");
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
