// nisc_alu: the custom ALU functional unit of the simple NISC IP.
//
// Combinational unit with two data inputs, one output and a 2-bit control
// port. It executes the three operations the architecture gives it: add,
// subtract (i0 - i1) and bitwise not (of i0). The control encoding is this
// design's choice (see nisc_pkg::alu_op_e); the unused code 3 gives zero.
// Result is valid in the same cycle as the inputs.
module nisc_alu #(
  parameter int unsigned BIT_WIDTH = 32
) (
  input  logic [BIT_WIDTH-1:0] i0,
  input  logic [BIT_WIDTH-1:0] i1,
  input  nisc_pkg::alu_op_e    ctrl,
  output logic [BIT_WIDTH-1:0] o
);
  import nisc_pkg::*;

  always_comb begin
    unique case (ctrl)
      ALU_ADD: o = i0 + i1;
      ALU_SUB: o = i0 - i1;
      ALU_NOT: o = ~i0;
      default: o = '0;
    endcase
  end
endmodule
