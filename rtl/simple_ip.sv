// simple_ip: the simple NISC IP (a NiscArchitecture) that executes compiled C.
//
// Components, as in the architecture description: a controller, a 32 x 32
// register file with two read ports and one write port (RF), two operand
// multiplexers (In0, In1), an ALU (add/sub/not), a comparator (comp), a
// result multiplexer (Out0) and a data-memory proxy whose signals are the
// IP's dm_* ports. Netlist:
//   constant field (sign-extended) -> In0.i0, In1.i0
//   RF.r0 -> In0.i1            RF.r1 -> In1.i1
//   In0.o -> alu.i0, comp.i0, memory address
//   In1.o -> alu.i1, comp.i1, memory write data
//   alu.o -> Out0.i1
//   comp.o -> Out0.i0 (zero-extended), controller status
//   memory read data -> Out0.i2
//   Out0.o -> RF.w0
// The memory proxy is plain wiring, so it is written inline here. Taking the
// memory address from the ALU (base + offset addressing) is this design's
// reading of the netlist.
//
// Timing: one control word per cycle, no pipelining. The word is read from
// the control memory, the datapath and the (external, combinational-read)
// data memory settle, and at the rising edge the register file, the data
// memory write and the program counter update. Reset is synchronous.
module simple_ip #(
  parameter int unsigned CMEM_DEPTH = nisc_pkg::CMEM_DEPTH,
  parameter int unsigned PC_W       = $clog2(CMEM_DEPTH)
) (
  input  logic                        clk,
  input  logic                        reset,
  // control-memory programming port
  input  logic                        prog_we,
  input  logic [PC_W-1:0]             prog_addr,
  input  nisc_pkg::cw_t               prog_data,
  // data-memory interface
  input  logic [nisc_pkg::DATA_W-1:0] dm_r,
  output logic [nisc_pkg::DATA_W-1:0] dm_addr,
  output logic [nisc_pkg::DATA_W-1:0] dm_w,
  output logic                        dm_readEn,
  output logic                        dm_writeEn,
  // observation
  output logic [PC_W-1:0]             pc
);
  import nisc_pkg::*;

  cw_t               cw;
  logic [DATA_W-1:0] const_ext, rf_r0, rf_r1, in0_o, in1_o, alu_o, out0_o;
  logic              comp_o;

  nisc_controller #(.DEPTH(CMEM_DEPTH)) controller (
    .clk, .reset, .status(comp_o),
    .prog_we, .prog_addr, .prog_data,
    .cw, .pc
  );

  assign const_ext = DATA_W'($signed(cw.konst));

  nisc_rf #(.BIT_WIDTH(DATA_W), .REG_COUNT(REG_COUNT)) RF (
    .clk,
    .raddr0(cw.rf_raddr0), .raddr1(cw.rf_raddr1),
    .waddr(cw.rf_waddr),   .we(cw.rf_we),
    .w0(out0_o), .r0(rf_r0), .r1(rf_r1)
  );

  nisc_mux #(.N(2), .W(DATA_W)) In0 (
    .i({rf_r0, const_ext}), .sel(cw.in0_sel), .o(in0_o)
  );

  nisc_mux #(.N(2), .W(DATA_W)) In1 (
    .i({rf_r1, const_ext}), .sel(cw.in1_sel), .o(in1_o)
  );

  nisc_alu #(.BIT_WIDTH(DATA_W)) alu (
    .i0(in0_o), .i1(in1_o), .ctrl(cw.alu_op), .o(alu_o)
  );

  nisc_comparator #(.BIT_WIDTH(DATA_W)) comp (
    .i0(in0_o), .i1(in1_o), .ctrl(cw.cmp_op), .o(comp_o)
  );

  // Out0: i0 = comparator, i1 = ALU, i2 = memory read data
  nisc_mux #(.N(3), .W(DATA_W)) Out0 (
    .i({dm_r, alu_o, DATA_W'(comp_o)}), .sel(cw.out0_sel), .o(out0_o)
  );

  // data-memory proxy
  assign dm_addr    = in0_o;
  assign dm_w       = in1_o;
  assign dm_readEn  = cw.dm_re;
  assign dm_writeEn = cw.dm_we;

  // a word may not read and write the data memory at once
  assert property (@(posedge clk) disable iff (reset) !(dm_readEn && dm_writeEn))
    else $error("control word reads and writes data memory in the same cycle");
endmodule
