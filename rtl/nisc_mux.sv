// nisc_mux: N-input multiplexer component of the NISC datapath.
//
// Combinational. Output o is input i[sel]; a select value with no input
// behind it (sel >= N) gives zero. The select is a control port driven from
// the control word. In the simple IP it is used as the operand selectors
// In0 and In1 (N = 2: constant or register) and as the result selector Out0
// (N = 3: comparator, ALU or memory).
module nisc_mux #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 32,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] i,
  input  logic [SEL_W-1:0]    sel,
  output logic [W-1:0]        o
);
  always_comb begin
    o = '0;
    for (int unsigned k = 0; k < N; k++)
      if (sel == SEL_W'(k)) o = i[k];
  end
endmodule
