// Register file: NREGS registers of WIDTH bits, two read ports, one write port.
//
// ra selects the register driven on busa and rb the one on busb; both reads
// are combinational (the clock matters only for writes). On a rising clock
// edge, when we (RegWr) is 1, busw is written into register rw. Register 0
// always reads as zero and ignores writes, as in the MIPS architecture. A
// write and a read of the same register in one cycle return the old value;
// the new one appears after the edge. The synchronous reset that clears
// every register is this design's choice, so that programs start from a
// known state.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
