// cdct_alu: loop-control ALU of the pipelined DCT datapath.
//
// Combinational add / and / or (nisc-style control port of 2 bits, code 3
// gives zero). After the loops of the matrix product are merged and
// unrolled, the index arithmetic reduces to incrementing a counter and
// masking / combining bit fields, so these three operations are all the
// datapath keeps.
module cdct_alu #(
  parameter int unsigned BIT_WIDTH = 32
) (
  input  logic [BIT_WIDTH-1:0] i0,
  input  logic [BIT_WIDTH-1:0] i1,
  input  cdct_pkg::cdct_alu_e  ctrl,
  output logic [BIT_WIDTH-1:0] o
);
  import cdct_pkg::*;

  always_comb begin
    unique case (ctrl)
      CA_ADD:  o = i0 + i1;
      CA_AND:  o = i0 & i1;
      CA_OR:   o = i0 | i1;
      default: o = '0;
    endcase
  end
endmodule
