// End-to-end testbench for mips_lite_cpu at its default sizes.
//
// Part 1 runs a hand-assembled program that stores 1..10 to data memory in
// one loop, sums them with lw in a second loop, stores the sum (55) and
// writes to register 0. The results and the cycle count (one instruction
// per clock: 128 cycles to reach the final self-loop) are checked against
// hand-computed values.
//
// Part 2 fills the whole instruction memory with random addu, subu, ori,
// lw, sw, beq and undefined instructions and runs them in lockstep with an
// instruction-level model: every cycle the PC and the register and memory
// writes must match, and at the end the register file and data memory are
// compared word by word.
//
// Each instruction kind, taken and not-taken branches, writes to register 0
// and undefined instructions are counted; a kind that never occurs counts as
// a failure.
module tb_mips_lite_cpu;
  import mips_lite_pkg::*;

  localparam int IW = 1024;  // must equal the CPU's default IMEM_WORDS
  localparam int DW = 1024;  // must equal the CPU's default DMEM_WORDS
  localparam int IAW = $clog2(IW);
  localparam int DAW = $clog2(DW);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  mips_lite_cpu dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .pc(pc), .instr(instr), .reg_we(reg_we),
    .reg_waddr(reg_waddr), .reg_wdata(reg_wdata), .mem_we(mem_we),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata)
  );

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] enc_r(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // ---------------- reference model ----------------
  logic [31:0] prog [IW];
  logic [31:0] mreg [32];
  logic [31:0] mmem [DW];
  logic [31:0] mpc;
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_r0, n_undef;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Compare the DUT's current-cycle outputs with the model, then advance the model.
  task automatic step_and_check();
    logic [31:0] ins, a, b, sext, zext, ea, wval;
    logic [5:0]  op, fn;
    int          rs, rt, rd, wreg;
    logic        wr, mw;
    ins  = prog[mpc[IAW+1:2]];
    op   = ins[31:26]; fn = ins[5:0];
    rs   = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a    = mreg[rs]; b = mreg[rt];
    sext = 32'($signed(ins[15:0]));
    zext = {16'h0, ins[15:0]};
    ea   = a + sext;
    wr = 0; mw = 0; wreg = 0; wval = 0;
    case (op)
      6'h00: begin
        if (fn == 6'h21) begin wr = 1; wreg = rd; wval = a + b; n_addu++; end
        else if (fn == 6'h23) begin wr = 1; wreg = rd; wval = a - b; n_subu++; end
        else n_undef++;
      end
      6'h0D: begin wr = 1; wreg = rt; wval = a | zext; n_ori++; end
      6'h23: begin wr = 1; wreg = rt; wval = mmem[ea[DAW+1:2]]; n_lw++; end
      6'h2B: begin mw = 1; n_sw++; end
      6'h04: if (a == b) n_beq_t++; else n_beq_nt++;
      default: n_undef++;
    endcase
    if (wr && wreg == 0) n_r0++;

    checks++;
    if (pc !== mpc || instr !== ins) fail($sformatf("pc=%h exp %h instr=%h exp %h", pc, mpc, instr, ins));
    checks++;
    if (reg_we !== wr || (wr && (int'(reg_waddr) !== wreg || reg_wdata !== wval)))
      fail($sformatf("pc=%h reg write %b r%0d=%h, exp %b r%0d=%h", mpc, reg_we, reg_waddr, reg_wdata, wr, wreg, wval));
    checks++;
    if (mem_we !== mw || (mw && (mem_addr[DAW+1:2] !== ea[DAW+1:2] || mem_wdata !== b)))
      fail($sformatf("pc=%h mem write %b [%h]=%h, exp %b [%h]=%h", mpc, mem_we, mem_addr, mem_wdata, mw, ea, b));

    if (wr && wreg != 0) mreg[wreg] = wval;
    if (mw) mmem[ea[DAW+1:2]] = b;
    if (op == 6'h04 && a == b) mpc = mpc + 32'd4 + (sext << 2);
    else mpc = mpc + 32'd4;
  endtask

  // Load prog[] into the CPU under reset and reset the model to match.
  task automatic load_and_reset();
    @(negedge clk);
    rst_n = 0;
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 32'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    @(negedge clk);
    rst_n = 1;
    mpc = 0;
    for (int i = 0; i < 32; i++) mreg[i] = '0;
    for (int i = 0; i < DW; i++) mmem[i] = dut.u_dmem.mem[i];
  endtask

  task automatic run_cycles(input int n);
    repeat (n) begin
      #1 step_and_check();
      @(negedge clk);
    end
  endtask

  task automatic compare_state();
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.u_regfile.regs[i] !== mreg[i]) fail($sformatf("r%0d=%h exp %h", i, dut.u_regfile.regs[i], mreg[i]));
    end
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== mmem[i]) fail($sformatf("mem[%0d]=%h exp %h", i, dut.u_dmem.mem[i], mmem[i]));
    end
  endtask

  function automatic logic [31:0] rand_instr();
    int k, r1, r2, r3;
    r1 = ($urandom_range(0, 7) == 0) ? int'($urandom_range(0, 31)) : int'($urandom_range(0, 7));
    r2 = int'($urandom_range(0, 7));
    r3 = int'($urandom_range(0, 7));
    k  = int'($urandom_range(0, 19));
    case (k)
      0: return enc_r(6'h21, r1, r2, r3);
      1: return enc_r(6'h23, r1, r2, r3);
      2: return enc_i(6'h0D, r1, r2, int'($urandom_range(0, 65535)));
      3: return enc_i(6'h23, r1, r2, int'($urandom_range(0, 65535)));
      4: return enc_i(6'h2B, r1, r2, int'($urandom_range(0, 65535)));
      5: return enc_i(6'h04, r2, r2, int'($urandom_range(0, 8)));          // always taken, forward
      6: return enc_i(6'h04, r1, r2, int'($urandom_range(0, 8)));          // data dependent, forward
      7: return enc_r(6'h21, r1, r2, r3) ^ {26'd0, 6'($urandom_range(1, 63))}; // other funct
      8, 9, 10: return enc_r(6'h21, r1, r2, r3);
      11, 12: return enc_r(6'h23, r1, r2, r3);
      13, 14: return enc_i(6'h23, r1, r2, int'($urandom_range(0, 65535)));
      15: return enc_i(6'h2B, r1, r2, int'($urandom_range(0, 65535)));
      16, 17: return enc_i(6'h04, r1, r2, int'($urandom_range(0, 8)));
      default: return enc_i(6'h0D, r1, r2, int'($urandom_range(0, 255)));
    endcase
  endfunction

  initial begin
    int cyc;
    rst_n = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    n_addu = 0; n_subu = 0; n_ori = 0; n_lw = 0; n_sw = 0;
    n_beq_t = 0; n_beq_nt = 0; n_r0 = 0; n_undef = 0;

    // ---------------- part 1: directed array sum ----------------
    for (int i = 0; i < IW; i++) prog[i] = '0;   // sll $0,$0,0: undefined here, a no-op
    prog[0]  = enc_i(6'h0D, 1, 0, 10);   // ori  $1,$0,10    counter
    prog[1]  = enc_i(6'h0D, 2, 0, 0);    // ori  $2,$0,0     address
    prog[2]  = enc_i(6'h0D, 3, 0, 1);    // ori  $3,$0,1     value
    prog[3]  = enc_i(6'h0D, 5, 0, 1);    // ori  $5,$0,1
    prog[4]  = enc_i(6'h0D, 6, 0, 4);    // ori  $6,$0,4
    prog[5]  = enc_i(6'h2B, 3, 2, 0);    // L1: sw $3,0($2)
    prog[6]  = enc_r(6'h21, 3, 3, 5);    // addu $3,$3,$5
    prog[7]  = enc_r(6'h21, 2, 2, 6);    // addu $2,$2,$6
    prog[8]  = enc_r(6'h23, 1, 1, 5);    // subu $1,$1,$5
    prog[9]  = enc_i(6'h04, 0, 1, 1);    // beq  $1,$0,+1 (to 11)
    prog[10] = enc_i(6'h04, 0, 0, -6);   // beq  $0,$0,L1
    prog[11] = enc_i(6'h0D, 1, 0, 10);   // ori  $1,$0,10
    prog[12] = enc_i(6'h0D, 2, 0, 0);    // ori  $2,$0,0
    prog[13] = enc_i(6'h0D, 4, 0, 0);    // ori  $4,$0,0     sum
    prog[14] = enc_i(6'h23, 7, 2, 0);    // L2: lw $7,0($2)
    prog[15] = enc_r(6'h21, 4, 4, 7);    // addu $4,$4,$7
    prog[16] = enc_r(6'h21, 2, 2, 6);    // addu $2,$2,$6
    prog[17] = enc_r(6'h23, 1, 1, 5);    // subu $1,$1,$5
    prog[18] = enc_i(6'h04, 0, 1, 1);    // beq  $1,$0,+1 (to 20)
    prog[19] = enc_i(6'h04, 0, 0, -6);   // beq  $0,$0,L2
    prog[20] = enc_i(6'h2B, 4, 0, 256);  // sw   $4,256($0)
    prog[21] = enc_r(6'h21, 0, 4, 4);    // addu $0,$4,$4   (discarded)
    prog[22] = enc_i(6'h04, 0, 0, -1);   // halt: beq $0,$0,halt
    load_and_reset();
    cyc = 0;
    while (pc != 32'd88 && cyc < 1000) begin
      #1 step_and_check();
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 128) fail($sformatf("directed program took %0d cycles, expected 128", cyc));
    run_cycles(5);
    checks++;
    if (dut.u_regfile.regs[4] !== 32'd55) fail($sformatf("sum r4=%0d, expected 55", dut.u_regfile.regs[4]));
    checks++;
    if (dut.u_dmem.mem[64] !== 32'd55) fail($sformatf("mem[256]=%0d, expected 55", dut.u_dmem.mem[64]));
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== 32'(i + 1)) fail($sformatf("mem[%0d]=%0d, expected %0d", 4 * i, dut.u_dmem.mem[i], i + 1));
    end
    checks++;
    if (dut.u_regfile.regs[0] !== 32'd0) fail("r0 was written");
    compare_state();

    // ---------------- part 2: random programs in lockstep ----------------
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < IW; i++) prog[i] = rand_instr();
      load_and_reset();
      run_cycles(3000);
      compare_state();
    end

    $display("mechanisms: addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d r0_write=%0d undefined=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_r0, n_undef);
    checks++; if (n_addu == 0)   fail("addu never executed");
    checks++; if (n_subu == 0)   fail("subu never executed");
    checks++; if (n_ori == 0)    fail("ori never executed");
    checks++; if (n_lw == 0)     fail("lw never executed");
    checks++; if (n_sw == 0)     fail("sw never executed");
    checks++; if (n_beq_t == 0)  fail("beq never taken");
    checks++; if (n_beq_nt == 0) fail("beq never fell through");
    checks++; if (n_r0 == 0)     fail("no write to r0 tried");
    checks++; if (n_undef == 0)  fail("no undefined instruction executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
