// cdct_datapath: custom four-stage pipelined datapath for the 2D DCT.
//
// The 8x8 DCT is computed as two matrix products, F = C1 x f x C2. The
// loop body of a matrix product is split into four pipeline stages:
//   stage 1  address calculation: adr_a <= R[r0] | ka, adr_b <= R[r1] | kb
//   stage 2  load:                va <= mem[adr_a], vb <= mem[adr_b]
//   stage 3  multiply:            prod <= va * vb
//   stage 4  accumulate:          acc <= (acc_clr ? 0 : acc) + prod,
//                                 and store: mem[R[r0]] <= acc
// Matrices sit at 64-word-aligned bases in row-major order, so the address
// of element (row, k) is base | 8*row | k and the additions become ORs; the
// inner loop is unrolled, making k and 8k constants of the control word
// (ka, kb). A small loop-control part (8-register file, add/and/or ALU,
// comparator) keeps the merged row/column counter and the row, column and
// output pointers; the comparator result is the branch status of the
// controller.
//
// There is no instruction set: the controller (nisc_controller) presents
// one control word per cycle and every stage acts on its own fields of
// that word, so a new multiply-accumulate can enter stage 1 every cycle and
// the program arranges when each stage acts. Stage registers hold their
// value while their enable is low. The data memory is external with two
// combinational read ports (A, B) and one clocked write port.
//
// What follows the architecture description: the four stages and their
// order, the unrolled inner loop and the conversion of index arithmetic to
// OR/AND. Everything else (two read ports, register count, field layout,
// 32-bit data, store from stage 4) is this design's own choice.
module cdct_datapath #(
  parameter int unsigned CMEM_DEPTH = cdct_pkg::CMEM_DEPTH,
  parameter int unsigned PC_W       = $clog2(CMEM_DEPTH),
  // pipeline registers between control memory and datapath (0: CDCT1;
  // 1 and 2: the controller-pipelined variants). Each one adds a branch
  // delay slot that the program must fill.
  parameter int unsigned CTRL_PIPE  = 0
) (
  input  logic                        clk,
  input  logic                        reset,
  // control-memory programming port
  input  logic                        prog_we,
  input  logic [PC_W-1:0]             prog_addr,
  input  cdct_pkg::cdct_cw_t          prog_data,
  // data memory: two read ports, one write port
  output logic [cdct_pkg::DATA_W-1:0] da_addr,
  input  logic [cdct_pkg::DATA_W-1:0] da_r,
  output logic [cdct_pkg::DATA_W-1:0] db_addr,
  input  logic [cdct_pkg::DATA_W-1:0] db_r,
  output logic [cdct_pkg::DATA_W-1:0] dw_addr,
  output logic [cdct_pkg::DATA_W-1:0] dw_data,
  output logic                        dw_en,
  // observation
  output logic [PC_W-1:0]             pc
);
  import cdct_pkg::*;

  cdct_cw_t          cw;
  logic [DATA_W-1:0] rf_r0, rf_r1, alu_i1, alu_o, konst_ext;
  logic              status;

  // pipeline registers
  logic [DATA_W-1:0] adr_a, adr_b;   // after stage 1
  logic [DATA_W-1:0] va, vb;         // after stage 2
  logic [DATA_W-1:0] prod;           // after stage 3
  logic [DATA_W-1:0] acc;            // stage 4 accumulator

  nisc_controller #(.CW_T(cdct_cw_t), .DEPTH(CMEM_DEPTH), .CTRL_PIPE(CTRL_PIPE)) controller (
    .clk, .reset, .status,
    .prog_we, .prog_addr, .prog_data,
    .cw, .pc
  );

  // loop control
  nisc_rf #(.BIT_WIDTH(DATA_W), .REG_COUNT(RF_REGS)) RF (
    .clk,
    .raddr0(cw.r0), .raddr1(cw.r1), .waddr(cw.wa), .we(cw.rf_we),
    .w0(alu_o), .r0(rf_r0), .r1(rf_r1)
  );

  assign konst_ext = DATA_W'($signed(cw.konst));

  nisc_mux #(.N(2), .W(DATA_W)) In1 (
    .i({rf_r1, konst_ext}), .sel(cw.alu_src1), .o(alu_i1)
  );

  cdct_alu #(.BIT_WIDTH(DATA_W)) alu (
    .i0(rf_r0), .i1(alu_i1), .ctrl(cw.alu_op), .o(alu_o)
  );

  nisc_comparator #(.BIT_WIDTH(DATA_W)) comp (
    .i0(rf_r0), .i1(rf_r1), .ctrl(cw.cmp_op), .o(status)
  );

  // the four stages
  always_ff @(posedge clk) begin
    if (reset) begin
      adr_a <= '0;
      adr_b <= '0;
      va    <= '0;
      vb    <= '0;
      prod  <= '0;
      acc   <= '0;
    end else begin
      if (cw.agu_en) begin
        adr_a <= rf_r0 | DATA_W'(cw.ka);
        adr_b <= rf_r1 | DATA_W'(cw.kb);
      end
      if (cw.ld_en) begin
        va <= da_r;
        vb <= db_r;
      end
      if (cw.mul_en) prod <= va * vb;
      if (cw.acc_en) acc <= (cw.acc_clr ? '0 : acc) + prod;
    end
  end

  assign da_addr = adr_a;
  assign db_addr = adr_b;
  assign dw_addr = rf_r0;
  assign dw_data = acc;
  assign dw_en   = cw.st_en;
endmodule
