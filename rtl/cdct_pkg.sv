// cdct_pkg: control word and encodings of the pipelined DCT datapath
// (cdct_datapath).
//
// The datapath executes the body of an 8x8 matrix product in four pipeline
// stages (address calculation, load, multiply, accumulate). As in every
// NISC datapath there is no instruction set: each cycle one 46-bit control
// word drives all stages at once, and the program (written ahead of time)
// arranges that a stage is told to act in the cycle its data arrives. All
// field positions and encodings are this design's choice; like the simple
// IP, the constant field sits at bits 9..0 and doubles as jump offset.
package cdct_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned RF_REGS  = 8;
  localparam int unsigned RADDR_W  = $clog2(RF_REGS);
  localparam int unsigned CONST_W  = 10;
  localparam int unsigned KOFF_W   = 6;    // address-offset fields ka, kb
  localparam int unsigned CMEM_DEPTH = 256;
  localparam int unsigned PC_W     = $clog2(CMEM_DEPTH);

  // loop-control ALU: the operations left after the code transformation
  // (additions and multiplications by powers of two turned into OR / AND)
  typedef enum logic [1:0] {
    CA_ADD = 2'd0,
    CA_AND = 2'd1,
    CA_OR  = 2'd2,
    CA_NONE = 2'd3    // result 0
  } cdct_alu_e;

  typedef struct packed {
    nisc_pkg::nxt_mode_e nxt;      // controller next-address mode
    nisc_pkg::cmp_op_e   cmp_op;   // comparator (branch status)
    logic                st_en;    // stage 4: store acc to mem[R[r0]]
    logic                acc_clr;  // stage 4: start a new sum
    logic                acc_en;   // stage 4: acc <= (clr ? 0 : acc) + prod
    logic                mul_en;   // stage 3: prod <= va * vb
    logic                ld_en;    // stage 2: va <= mem[adr_a], vb <= mem[adr_b]
    logic                agu_en;   // stage 1: adr_a <= R[r0] | ka, adr_b <= R[r1] | kb
    logic [KOFF_W-1:0]   kb;       // stage 1 offset for port B
    logic [KOFF_W-1:0]   ka;       // stage 1 offset for port A
    logic                alu_src1; // ALU i1: 0 constant, 1 R[r1]
    cdct_alu_e           alu_op;   // loop-control ALU
    logic                rf_we;    // write ALU result to R[wa]
    logic [RADDR_W-1:0]  wa;
    logic [RADDR_W-1:0]  r1;
    logic [RADDR_W-1:0]  r0;
    logic [CONST_W-1:0]  konst;    // ALU constant or jump offset
  } cdct_cw_t;

  localparam int unsigned CW_W = $bits(cdct_cw_t);

endpackage
