// mac_datapath: ADD / MUL / MAC datapath with operand gating.
//
// A multiplier and an adder feed one result register, acc. Every operation
// takes one cycle; MAC chains the multiplier into the adder within the
// cycle instead of spending a second cycle on it:
//   op = 1 ADD: acc <= a + b
//   op = 2 MUL: acc <= a * b          (low W bits)
//   op = 3 MAC: acc <= acc + a * b
//   op = 0    : acc holds
// The adder's inputs are multiplexed between (a, b) for ADD and
// (product, acc) for MAC.
//
// With GATING = 1 (the power-saving variant this design follows), the inputs
// of a unit that the current operation does not use are forced to zero by
// AND gates, so that unit sees no switching activity: the multiplier is
// gated during ADD and no-op, the adder during MUL and no-op. GATING = 0
// gives the plain datapath with the same results. Operation codes, widths
// and the reset of acc (synchronous, to zero) are this design's choices.
module mac_datapath #(
  parameter int unsigned W      = 32,
  parameter bit          GATING = 1'b1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [1:0]   op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] acc
);
  localparam logic [1:0] OP_NOP = 2'd0, OP_ADD = 2'd1, OP_MUL = 2'd2, OP_MAC = 2'd3;

  logic         mul_gate, add_gate;
  logic [W-1:0] mul_i0, mul_i1, prod;
  logic [W-1:0] add_i0, add_i1, sum;

  assign mul_gate = GATING ? (op == OP_MUL || op == OP_MAC) : 1'b1;
  assign add_gate = GATING ? (op == OP_ADD || op == OP_MAC) : 1'b1;

  assign mul_i0 = a & {W{mul_gate}};
  assign mul_i1 = b & {W{mul_gate}};
  assign prod   = mul_i0 * mul_i1;

  assign add_i0 = ((op == OP_MAC) ? prod : a) & {W{add_gate}};
  assign add_i1 = ((op == OP_MAC) ? acc  : b) & {W{add_gate}};
  assign sum    = add_i0 + add_i1;

  always_ff @(posedge clk) begin
    if (reset) acc <= '0;
    else begin
      unique case (op)
        OP_ADD, OP_MAC: acc <= sum;
        OP_MUL:         acc <= prod;
        default:        ;
      endcase
    end
  end
endmodule
