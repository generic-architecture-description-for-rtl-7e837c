// div_pipe: pipelined integer divider core.
//
// A signed W-bit divider built as STAGES pipeline stages of two clock cycles
// each (4 stages x 2 cycles for the default, as the architecture gives).
// Seen from outside:
//   * start is the control port: pulse it for one cycle with the operands on
//     dividend/divisor, and keep the operands unchanged in the next cycle too
//     (the first stage reads them in both of its cycles);
//   * quotient and remainder are valid, and done pulses, exactly 2*STAGES
//     cycles after start (cycle t+8 for a start in cycle t);
//   * a new division may start every second cycle, so up to STAGES divisions
//     are in flight.
// Inside, each stage performs W/(2*STAGES) steps of restoring division per
// cycle on the operand magnitudes (4 steps per cycle, 8 per stage, for W=32).
// In its first cycle a stage works from its input and parks the partial
// remainder and quotient in a mid register; in its second cycle it finishes
// from the mid register, taking divisor and signs again from its input, and
// loads its output register. The last stage applies the signs. The stage
// algorithm, the C-style signed results (quotient rounded toward zero,
// remainder with the dividend's sign) and the done pulse are this design's
// own choices. Division by zero gives quotient -1 (non-negative dividend) or
// 1 (negative dividend) and the dividend as remainder.
module div_pipe #(
  parameter int unsigned W      = 32,
  parameter int unsigned STAGES = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         done
);
  localparam int unsigned CYCLES_PER_STAGE = 2;
  localparam int unsigned STEPS = W / (STAGES * CYCLES_PER_STAGE);

  typedef struct packed {
    logic [W-1:0] rem;   // partial remainder
    logic [W-1:0] q;     // dividend bits still to shift in / quotient bits
  } rq_t;

  typedef struct packed {
    rq_t          rq;
    logic [W-1:0] d;     // divisor magnitude
    logic         nq;    // negate quotient at the end
    logic         nr;    // negate remainder at the end
  } dstate_t;

  // STEPS restoring-division steps
  function automatic rq_t div_steps(input rq_t x, input logic [W-1:0] d);
    logic [W:0] sh;
    for (int unsigned s = 0; s < STEPS; s++) begin
      sh     = {x.rem, x.q[W-1]};
      x.q    = {x.q[W-2:0], 1'b0};
      if (sh >= {1'b0, d}) begin
        sh     = sh - {1'b0, d};
        x.q[0] = 1'b1;
      end
      x.rem = sh[W-1:0];
    end
    return x;
  endfunction

  dstate_t st_in  [STAGES];
  logic    in_go  [STAGES];
  rq_t     mid    [STAGES];
  logic    mid_v  [STAGES];
  dstate_t st_out [STAGES];
  logic    out_v  [STAGES];

  // stage 0 input straight from the ports
  always_comb begin
    st_in[0].rq.rem = '0;
    st_in[0].rq.q   = dividend[W-1] ? -dividend : dividend;
    st_in[0].d      = divisor[W-1]  ? -divisor  : divisor;
    st_in[0].nq     = dividend[W-1] ^ divisor[W-1];
    st_in[0].nr     = dividend[W-1];
    in_go[0]        = start;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    if (k > 0) begin : g_link
      assign st_in[k] = st_out[k-1];
      assign in_go[k] = out_v[k-1];
    end

    always_ff @(posedge clk) begin
      if (reset) begin
        mid_v[k] <= 1'b0;
        out_v[k] <= 1'b0;
      end else begin
        mid_v[k] <= in_go[k];
        out_v[k] <= mid_v[k];
      end
      if (in_go[k]) mid[k] <= div_steps(st_in[k].rq, st_in[k].d);
      if (mid_v[k]) begin
        st_out[k].rq <= div_steps(mid[k], st_in[k].d);
        st_out[k].d  <= st_in[k].d;
        st_out[k].nq <= st_in[k].nq;
        st_out[k].nr <= st_in[k].nr;
      end
    end
  end

  assign quotient  = st_out[STAGES-1].nq ? -st_out[STAGES-1].rq.q   : st_out[STAGES-1].rq.q;
  assign remainder = st_out[STAGES-1].nr ? -st_out[STAGES-1].rq.rem : st_out[STAGES-1].rq.rem;
  assign done      = out_v[STAGES-1];

  // issue rules of the core
  assert property (@(posedge clk) disable iff (reset) start |=> !start)
    else $error("div_pipe: new division less than two cycles after the previous one");
  assert property (@(posedge clk) disable iff (reset)
                   start |=> ($stable(dividend) && $stable(divisor)))
    else $error("div_pipe: operands not held for two cycles");
endmodule
