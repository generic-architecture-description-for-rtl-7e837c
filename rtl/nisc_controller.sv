// nisc_controller: controller of a NISC datapath.
//
// The datapath has no instruction decoder: the program is a sequence of
// control words, one per clock cycle, produced ahead of time. The controller
// holds them in a control memory of DEPTH words, keeps the fetch address, and
// presents one word per cycle on its cwPort (cw). Every field of that word
// drives a control port of some datapath component for that cycle.
//
// CTRL_PIPE sets the number of pipeline registers between the control memory
// and cw ("controller pipelining"). With 0 the word is read combinationally
// and used in the cycle it is fetched. With P > 0 a word reaches cw P cycles
// after its fetch, which takes the control-memory read off the datapath's
// critical path. Branches are still resolved when the branch word is on cw,
// so the P words fetched behind it always execute (branch delay slots). The
// program generator must fill them, with useful work or with no-ops. There is
// no hardware hazard handling, in keeping with the NISC approach.
//
// Next fetch address, chosen by the nxt field of the word on cw, which was
// fetched from address xpc:
//   NXT_SEQ  fetch + 1
//   NXT_JUMP xpc + sext(konst)
//   NXT_BRT  xpc + sext(konst) if status = 1, else fetch + 1
//   NXT_BRF  xpc + sext(konst) if status = 0, else fetch + 1
// With P = 0, xpc and fetch are the same address. The constant field doubles
// as the jump offset, as the architecture gives; the mode field and its
// encoding are this design's choice. status is the comparator output of the
// same cycle. A jump with offset 0 parks the controller on one word (used as
// "halt" by programs; with P > 0 the words behind the halt keep cycling too).
//
// The control-word type is a parameter (CW_T): any packed struct with a
// 2-bit nisc_pkg::nxt_mode_e field named nxt and a signed constant field
// named konst works, so the same controller serves every datapath.
//
// Reset (synchronous, active high) sets the fetch address to 0, clears the
// pipeline registers and forces cw to all zeros, which is a no-operation. The
// pc output is the address of the word on cw. The control memory is filled
// through a write port (prog_we/prog_addr/prog_data), normally while reset is
// held; a write lands at the clock edge.
module nisc_controller #(
  parameter type         CW_T      = nisc_pkg::cw_t,
  parameter int unsigned DEPTH     = nisc_pkg::CMEM_DEPTH,
  parameter int unsigned PC_W      = $clog2(DEPTH),
  parameter int unsigned CTRL_PIPE = 0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             status,
  input  logic             prog_we,
  input  logic [PC_W-1:0]  prog_addr,
  input  CW_T              prog_data,
  output CW_T              cw,
  output logic [PC_W-1:0]  pc
);
  import nisc_pkg::*;

  CW_T             cmem [DEPTH];
  logic [PC_W-1:0] fetch_pc;
  CW_T             stage_cw [CTRL_PIPE+1];
  logic [PC_W-1:0] stage_pc [CTRL_PIPE+1];
  CW_T             word;
  logic [PC_W-1:0] xpc;
  logic            take;
  logic [PC_W-1:0] offset;

  always_ff @(posedge clk)
    if (prog_we) cmem[prog_addr] <= prog_data;

  assign stage_cw[0] = cmem[fetch_pc];
  assign stage_pc[0] = fetch_pc;

  for (genvar s = 1; s <= CTRL_PIPE; s++) begin : g_pipe
    always_ff @(posedge clk) begin
      if (reset) begin
        stage_cw[s] <= '0;
        stage_pc[s] <= '0;
      end else begin
        stage_cw[s] <= stage_cw[s-1];
        stage_pc[s] <= stage_pc[s-1];
      end
    end
  end

  assign word   = stage_cw[CTRL_PIPE];
  assign xpc    = stage_pc[CTRL_PIPE];
  assign offset = PC_W'($signed(word.konst));

  always_comb begin
    unique case (word.nxt)
      NXT_SEQ:  take = 1'b0;
      NXT_JUMP: take = 1'b1;
      NXT_BRT:  take = status;
      NXT_BRF:  take = !status;
      default:  take = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) fetch_pc <= '0;
    else       fetch_pc <= take ? xpc + offset : fetch_pc + PC_W'(1);
  end

  assign cw = reset ? '0 : word;
  assign pc = xpc;
endmodule
