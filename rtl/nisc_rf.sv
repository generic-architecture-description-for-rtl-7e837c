// nisc_rf: register file with two read ports and one write port (RF2x1).
//
// REG_COUNT registers of BIT_WIDTH bits (32 x 32 in the simple IP, as the
// architecture gives). Reads are combinational: r0 = regs[raddr0],
// r1 = regs[raddr1] in the same cycle. The write of w0 to regs[waddr]
// happens at the rising clock edge when we is high, so a value written in
// one cycle is read in the next. The addresses and the write enable are
// control ports driven by the control word. Register contents are not reset
// and no register is hard-wired to zero: both are this design's choices.
module nisc_rf #(
  parameter int unsigned BIT_WIDTH = 32,
  parameter int unsigned REG_COUNT = 32,
  parameter int unsigned ADDR_W = $clog2(REG_COUNT)
) (
  input  logic                 clk,
  input  logic [ADDR_W-1:0]    raddr0,
  input  logic [ADDR_W-1:0]    raddr1,
  input  logic [ADDR_W-1:0]    waddr,
  input  logic                 we,
  input  logic [BIT_WIDTH-1:0] w0,
  output logic [BIT_WIDTH-1:0] r0,
  output logic [BIT_WIDTH-1:0] r1
);
  logic [BIT_WIDTH-1:0] regs [REG_COUNT];

  always_ff @(posedge clk)
    if (we) regs[waddr] <= w0;

  assign r0 = regs[raddr0];
  assign r1 = regs[raddr1];
endmodule
