// tb_nisc_controller: self-checking test of the NISC controller.
// Fills the whole control memory with random control words through the
// programming port while reset is held, checks that the control word output
// is a no-operation during reset, then runs 3000 cycles with a random
// status input. Each cycle the program counter and the control word are
// compared with a reference model of the next-address rules (sequential,
// relative jump, branch on status = 1, branch on status = 0).
// A second controller with two pipeline registers (CTRL_PIPE = 2) runs the
// same program and status beside it, against a model in which every word
// reaches the output two cycles after its fetch and the two words fetched
// behind a taken branch still execute.
module tb_nisc_controller;
  import nisc_pkg::*;
  localparam int DEPTH = CMEM_DEPTH;
  logic            clk = 0, reset, status, prog_we;
  logic [PC_W-1:0] prog_addr, pc, pc_ref;
  cw_t             prog_data, cw;
  cw_t             mem_ref [DEPTH];
  int checks = 0, failures = 0;
  int n_seq = 0, n_jump = 0, n_taken = 0, n_not_taken = 0;

  localparam int P = 2;
  logic [PC_W-1:0] pc2, fetch_ref;
  cw_t             cw2;
  int              inflight [$];   // addresses fetched, not yet on cw; -1 = reset bubble
  int              n_slot_taken = 0;

  nisc_controller #(.DEPTH(DEPTH)) dut (.clk, .reset, .status, .prog_we, .prog_addr, .prog_data, .cw, .pc);
  nisc_controller #(.DEPTH(DEPTH), .CTRL_PIPE(P)) dut_p (.clk, .reset, .status, .prog_we, .prog_addr,
                                                        .prog_data, .cw(cw2), .pc(pc2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PC_W-1:0] next_pc(input logic [PC_W-1:0] p, input cw_t w, input logic st);
    logic [PC_W-1:0] off = PC_W'(unsigned'(32'(signed'(w.konst))));
    case (w.nxt)
      NXT_JUMP: return p + off;
      NXT_BRT:  return st ? p + off : p + 1'b1;
      NXT_BRF:  return st ? p + 1'b1 : p + off;
      default:  return p + 1'b1;
    endcase
  endfunction

  initial begin
    reset = 1; status = 0; prog_we = 0; prog_addr = '0; prog_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = PC_W'(a);
      prog_data = cw_t'({$urandom, $urandom});
      mem_ref[a] = prog_data;
      checks++;
      if (cw !== '0 || cw2 !== '0) begin failures++; $display("FAIL cw not NOP during reset"); end
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk);
    checks++;
    if (pc !== '0) begin failures++; $display("FAIL pc not 0 in reset"); end
    reset = 0;
    pc_ref = '0;
    fetch_ref = '0;
    repeat (P) inflight.push_back(-1);
    for (int c = 0; c < 3000; c++) begin
      status = 1'($urandom);
      #1;
      checks++;
      if (pc !== pc_ref || cw !== mem_ref[pc_ref]) begin
        failures++;
        $display("FAIL cycle %0d pc %0d want %0d cw %h want %h", c, pc, pc_ref, cw, mem_ref[pc_ref]);
      end
      case (mem_ref[pc_ref].nxt)
        NXT_SEQ:  n_seq++;
        NXT_JUMP: n_jump++;
        NXT_BRT:  if (status)  n_taken++; else n_not_taken++;
        NXT_BRF:  if (!status) n_taken++; else n_not_taken++;
        default: ;
      endcase
      pc_ref = next_pc(pc_ref, mem_ref[pc_ref], status);
      begin
        int              x;
        cw_t             xw;
        logic [PC_W-1:0] xp, tgt;
        x   = inflight.pop_front();
        xw  = (x < 0) ? '0 : mem_ref[x];
        xp  = (x < 0) ? '0 : PC_W'(x);
        tgt = next_pc(xp, xw, status);
        checks++;
        if (pc2 !== xp || cw2 !== xw) begin
          failures++;
          $display("FAIL pipelined cycle %0d pc %0d want %0d cw %h want %h", c, pc2, xp, cw2, xw);
        end
        inflight.push_back(int'(fetch_ref));
        if (tgt != xp + 1'b1) begin
          fetch_ref = tgt;
          n_slot_taken++;
        end else begin
          fetch_ref = fetch_ref + 1'b1;
        end
      end
      @(negedge clk);
    end
    if (n_slot_taken == 0 ||
        n_seq == 0 || n_jump == 0 || n_taken == 0 || n_not_taken == 0) begin
      failures++;
      $display("FAIL a next-address mode never occurred");
    end
    $display("seq=%0d jump=%0d taken=%0d not_taken=%0d pipelined redirects=%0d",
             n_seq, n_jump, n_taken, n_not_taken, n_slot_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
