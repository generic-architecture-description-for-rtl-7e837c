// nisc_comparator: the comparator functional unit of the simple NISC IP.
//
// Combinational. Compares i0 against i1 with the relation chosen by the
// 3-bit control port and outputs 1 when it holds. The output goes both to
// the controller, as the status for conditional jumps, and to the result
// multiplexer, so a comparison can also be written to a register. The
// architecture only names this unit; the set of relations (the C relational
// operators on signed operands plus unsigned < and >=) is this design's choice.
module nisc_comparator #(
  parameter int unsigned BIT_WIDTH = 32
) (
  input  logic [BIT_WIDTH-1:0] i0,
  input  logic [BIT_WIDTH-1:0] i1,
  input  nisc_pkg::cmp_op_e    ctrl,
  output logic                 o
);
  import nisc_pkg::*;

  logic lt_s, lt_u, eq;

  always_comb begin
    eq   = (i0 == i1);
    lt_s = ($signed(i0) < $signed(i1));
    lt_u = (i0 < i1);
    unique case (ctrl)
      CMP_EQ:  o = eq;
      CMP_NE:  o = !eq;
      CMP_LT:  o = lt_s;
      CMP_LE:  o = lt_s || eq;
      CMP_GT:  o = !(lt_s || eq);
      CMP_GE:  o = !lt_s;
      CMP_LTU: o = lt_u;
      CMP_GEU: o = !lt_u;
      default: o = 1'b0;
    endcase
  end
endmodule
