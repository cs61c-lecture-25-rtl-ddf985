// Self-checking testbench for ifetch: loads random words through the load
// port, then runs with random branch/zero inputs. Every cycle the
// instruction must be the word stored at the PC, and the PC must advance by
// 4, or to PC+4+4*imm16 when branch and zero are both set. The PC must hold
// while the load port is in use.
module tb_ifetch;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WORDS = 64;
  logic        rst_n, branch, zero, load_we;
  logic [31:0] load_addr, load_data, pc, instr;
  logic [31:0] prog [WORDS];
  logic [31:0] pc_model;
  int          taken = 0;

  ifetch #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .branch(branch), .zero(zero),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .instr(instr)
  );

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s pc=%h exp %h instr=%h", what, pc, pc_model, instr);
    end
  endtask

  initial begin
    rst_n = 0; branch = 0; zero = 0; load_we = 0; load_addr = 0; load_data = 0;
    @(posedge clk); #1;
    rst_n = 1;
    pc_model = 0;
    chk("reset pc", pc === 32'h0);
    // load the program while out of reset: the PC must hold
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      prog[i] = $urandom;
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
      chk("pc holds during load", pc === pc_model);
    end
    repeat (2000) begin
      @(negedge clk);
      load_we = 0;
      branch = 1'($urandom); zero = 1'($urandom);
      #1;
      chk("instr = mem[pc]", instr === prog[pc_model[7:2]] && pc === pc_model);
      @(posedge clk); #1;
      if (branch && zero) begin
        pc_model = pc_model + 32'd4 + 32'(32'($signed(prog[pc_model[7:2]][15:0])) * 4);
        taken++;
      end else begin
        pc_model = pc_model + 32'd4;
      end
      chk("next pc", pc === pc_model);
    end
    checks++;
    if (taken == 0) begin failures++; $display("FAIL no branch taken"); end
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
