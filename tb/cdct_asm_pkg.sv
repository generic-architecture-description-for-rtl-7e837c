// cdct_asm_pkg: control-word builders and the matrix-product program for
// the pipelined DCT datapath (cdct_datapath), shared by its testbenches.
//
// emit_product appends the words of one 8x8 matrix product
// OUT = A x B (row-major matrices at 64-word-aligned bases):
//   7 set-up words, then 15 words per output element, repeated 64 times
//   by a loop over the merged row/column counter n = 8*row + column.
// Words 0..7 of the body start the 8 unrolled multiply-accumulates in
// stage 1 on consecutive cycles; loads, multiplies and accumulates follow
// one, two and three cycles later. Words 8..14 drain the pipeline while
// updating the counter and pointers, store the sum and branch back.
// Registers: R1 counter n, R2 row pointer (A | 8*row), R3 column pointer
// (B | column), R4 output pointer, R5 scratch, R6 base of A, R7 base of B,
// R0 = 64 (loop bound).
// delay_slots must equal the controller's CTRL_PIPE: that many no-op words
// follow the loop branch (and the halt word) and execute behind it.
package cdct_asm_pkg;
  import nisc_pkg::*;
  import cdct_pkg::*;

  localparam int SETUP_WORDS = 7;
  localparam int BODY_WORDS  = 15;

  // R[wa] = R[r0] op konst
  function automatic cdct_cw_t alu_k(cdct_alu_e op, int wa, int r0, int k);
    cdct_cw_t w = '0;
    w.alu_op = op; w.rf_we = 1'b1; w.wa = RADDR_W'(wa); w.r0 = RADDR_W'(r0);
    w.alu_src1 = 1'b0; w.konst = CONST_W'(k);
    return w;
  endfunction

  // R[wa] = R[r0] op R[r1]
  function automatic cdct_cw_t alu_r(cdct_alu_e op, int wa, int r0, int r1);
    cdct_cw_t w = '0;
    w.alu_op = op; w.rf_we = 1'b1; w.wa = RADDR_W'(wa); w.r0 = RADDR_W'(r0);
    w.alu_src1 = 1'b1; w.r1 = RADDR_W'(r1);
    return w;
  endfunction

  // halt word followed by the no-ops that execute behind it
  function automatic void emit_halt(ref cdct_cw_t prog [$], input int delay_slots = 0);
    prog.push_back(halt());
    repeat (delay_slots) prog.push_back('0);
  endfunction

  function automatic cdct_cw_t halt();
    cdct_cw_t w = '0;
    w.nxt = NXT_JUMP;   // jump by 0
    return w;
  endfunction

  function automatic void emit_product(ref cdct_cw_t prog [$], input int base_a,
                                       input int base_b, input int base_out,
                                       input int delay_slots = 0);
    int top;
    prog.push_back(alu_k(CA_AND, 1, 1, 0));          // n = 0
    prog.push_back(alu_k(CA_OR,  6, 1, base_a));
    prog.push_back(alu_k(CA_OR,  7, 1, base_b));
    prog.push_back(alu_k(CA_OR,  4, 1, base_out));
    prog.push_back(alu_k(CA_OR,  0, 1, 64));
    prog.push_back(alu_k(CA_OR,  2, 6, 0));          // row pointer
    prog.push_back(alu_k(CA_OR,  3, 7, 0));          // column pointer
    top = prog.size();
    for (int s = 0; s < BODY_WORDS; s++) begin
      cdct_cw_t w;
      w = '0;
      case (s)
        8:  w = alu_k(CA_ADD, 1, 1, 1);              // n++
        9:  w = alu_k(CA_AND, 5, 1, 56);             // 8 * row
        10: w = alu_r(CA_OR,  2, 5, 6);              // row pointer
        11: begin w = alu_k(CA_ADD, 4, 4, 1); w.st_en = 1'b1; end  // store, out++
        12: w = alu_k(CA_AND, 5, 1, 7);              // column
        13: w = alu_r(CA_OR,  3, 5, 7);              // column pointer
        14: begin                                    // loop while n != 64
          w.cmp_op = CMP_NE; w.r0 = 3'd1; w.r1 = 3'd0;
          w.nxt = NXT_BRT; w.konst = CONST_W'(-s);
        end
        default: ;
      endcase
      if (s <= 7) begin
        w.agu_en = 1'b1; w.ka = KOFF_W'(s); w.kb = KOFF_W'(8 * s);
        w.r0 = 3'd2; w.r1 = 3'd3;
      end
      if (s >= 1 && s <= 8)  w.ld_en  = 1'b1;
      if (s >= 2 && s <= 9)  w.mul_en = 1'b1;
      if (s >= 3 && s <= 10) w.acc_en = 1'b1;
      if (s == 3)            w.acc_clr = 1'b1;
      prog.push_back(w);
    end
    repeat (delay_slots) prog.push_back('0);
  endfunction

  // integer DCT matrix C1 = round(1024 * cos((2n+1)u*pi/16) / 8)
  function automatic int c1_entry(int u, int n);
    real c = $cos((2.0 * n + 1.0) * u * 3.14159265358979 / 16.0) / 8.0;
    return $rtoi(c * 1024.0 + (c >= 0 ? 0.5 : -0.5));
  endfunction
endpackage
