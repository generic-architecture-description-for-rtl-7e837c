// nisc_pkg: shared types and constants of the simple NISC IP.
//
// The IP has no instruction set. Every clock cycle the controller puts one
// control word on its cwPort, and the fields of that word drive the control
// ports of the datapath components directly. The layout below is the single
// place where those fields are defined; the controller, the datapath top and
// the testbenches all use it.
//
// Layout (LSB first): a 10-bit constant field at bits 9..0, which feeds the
// constant inputs of the operand multiplexers and is also the signed offset
// of jumps, then the ALU control from bit 10 upward, then the other control
// ports. The constant width, its position and the ALU control position
// follow the architecture description; the remaining fields, their order and
// their encodings are this design's own choice. The control ports of this
// datapath add up to 29 bits, so a control word is 39 bits.
package nisc_pkg;

  localparam int unsigned DATA_W    = 32;   // bus width of the IP
  localparam int unsigned REG_COUNT = 32;   // registers in the register file
  localparam int unsigned RADDR_W   = $clog2(REG_COUNT);
  localparam int unsigned CONST_W   = 10;   // constant / jump-offset field
  localparam int unsigned CMEM_DEPTH = 1024; // control words in the controller
  localparam int unsigned PC_W      = $clog2(CMEM_DEPTH);

  // ALU control port (2 bits): add, sub, not
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,   // i0 - i1
    ALU_NOT = 2'd2,   // ~i0
    ALU_NONE = 2'd3   // result 0
  } alu_op_e;

  // Comparator control port (3 bits)
  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NE  = 3'd1,
    CMP_LT  = 3'd2,   // signed
    CMP_LE  = 3'd3,
    CMP_GT  = 3'd4,
    CMP_GE  = 3'd5,
    CMP_LTU = 3'd6,   // unsigned
    CMP_GEU = 3'd7
  } cmp_op_e;

  // Controller next-address mode (2 bits)
  typedef enum logic [1:0] {
    NXT_SEQ  = 2'd0,  // pc + 1
    NXT_JUMP = 2'd1,  // pc + sext(const)
    NXT_BRT  = 2'd2,  // pc + sext(const) if status = 1, else pc + 1
    NXT_BRF  = 2'd3   // pc + sext(const) if status = 0, else pc + 1
  } nxt_mode_e;

  // Out0 (result multiplexer) inputs
  localparam logic [1:0] OUT_CMP = 2'd0;
  localparam logic [1:0] OUT_ALU = 2'd1;
  localparam logic [1:0] OUT_MEM = 2'd2;

  // In0 / In1 (operand multiplexer) inputs
  localparam logic IN_CONST = 1'b0;
  localparam logic IN_RF    = 1'b1;

  typedef struct packed {
    nxt_mode_e            nxt;      // controller
    logic                 dm_we;    // memory proxy write enable
    logic                 dm_re;    // memory proxy read enable
    cmp_op_e              cmp_op;   // comparator
    logic [1:0]           out0_sel; // Out0
    logic                 in1_sel;  // In1
    logic                 in0_sel;  // In0
    logic                 rf_we;    // RF write enable
    logic [RADDR_W-1:0]   rf_waddr; // RF w0 address
    logic [RADDR_W-1:0]   rf_raddr1;// RF r1 address
    logic [RADDR_W-1:0]   rf_raddr0;// RF r0 address
    alu_op_e              alu_op;   // ALU ctrl, bits 11..10
    logic [CONST_W-1:0]   konst;    // constant field, bits 9..0
  } cw_t;

  localparam int unsigned CW_W = $bits(cw_t);

endpackage
