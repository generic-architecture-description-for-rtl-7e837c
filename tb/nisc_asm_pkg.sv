// nisc_asm_pkg: control-word builders for testbench programs of the simple
// NISC IP. Each function returns one control word (one clock cycle). By
// convention programs keep register 0 at zero (set by the first word).
// Register/constant operands: In0 and In1 select either a register read
// port or the sign-extended 10-bit constant field; only one constant
// exists per word.
package nisc_asm_pkg;
  import nisc_pkg::*;

  function automatic cw_t nop();
    return '0;
  endfunction

  // rd = rs OP rt   (registers)
  function automatic cw_t alu_rr(alu_op_e op, int rd, int rs, int rt);
    cw_t w = '0;
    w.alu_op = op; w.in0_sel = IN_RF; w.in1_sel = IN_RF;
    w.rf_raddr0 = RADDR_W'(rs); w.rf_raddr1 = RADDR_W'(rt);
    w.out0_sel = OUT_ALU; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = rs OP k
  function automatic cw_t alu_ri(alu_op_e op, int rd, int rs, int k);
    cw_t w = '0;
    w.alu_op = op; w.in0_sel = IN_RF; w.in1_sel = IN_CONST;
    w.rf_raddr0 = RADDR_W'(rs); w.konst = CONST_W'(k);
    w.out0_sel = OUT_ALU; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = k - k = 0 (constant on both inputs)
  function automatic cw_t clr(int rd);
    cw_t w = '0;
    w.alu_op = ALU_SUB; w.in0_sel = IN_CONST; w.in1_sel = IN_CONST;
    w.out0_sel = OUT_ALU; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = k  (k + r0, r0 = 0)
  function automatic cw_t li(int rd, int k);
    cw_t w = '0;
    w.alu_op = ALU_ADD; w.in0_sel = IN_CONST; w.in1_sel = IN_RF;
    w.rf_raddr1 = '0; w.konst = CONST_W'(k);
    w.out0_sel = OUT_ALU; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = (rs REL rt) ? 1 : 0
  function automatic cw_t set_rr(cmp_op_e rel, int rd, int rs, int rt);
    cw_t w = '0;
    w.cmp_op = rel; w.in0_sel = IN_RF; w.in1_sel = IN_RF;
    w.rf_raddr0 = RADDR_W'(rs); w.rf_raddr1 = RADDR_W'(rt);
    w.out0_sel = OUT_CMP; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = mem[rs]
  function automatic cw_t ld_r(int rd, int rs);
    cw_t w = '0;
    w.in0_sel = IN_RF; w.rf_raddr0 = RADDR_W'(rs); w.dm_re = 1'b1;
    w.out0_sel = OUT_MEM; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // rd = mem[k]
  function automatic cw_t ld_k(int rd, int k);
    cw_t w = '0;
    w.in0_sel = IN_CONST; w.konst = CONST_W'(k); w.dm_re = 1'b1;
    w.out0_sel = OUT_MEM; w.rf_we = 1'b1; w.rf_waddr = RADDR_W'(rd);
    return w;
  endfunction

  // mem[rs] = rt
  function automatic cw_t st_r(int rs, int rt);
    cw_t w = '0;
    w.in0_sel = IN_RF; w.rf_raddr0 = RADDR_W'(rs);
    w.in1_sel = IN_RF; w.rf_raddr1 = RADDR_W'(rt); w.dm_we = 1'b1;
    return w;
  endfunction

  // mem[k] = rt
  function automatic cw_t st_k(int k, int rt);
    cw_t w = '0;
    w.in0_sel = IN_CONST; w.konst = CONST_W'(k);
    w.in1_sel = IN_RF; w.rf_raddr1 = RADDR_W'(rt); w.dm_we = 1'b1;
    return w;
  endfunction

  // pc += off if (rs REL rt) holds (NXT_BRT) or fails (NXT_BRF)
  function automatic cw_t br_rr(cmp_op_e rel, bit if_true, int rs, int rt, int off);
    cw_t w = '0;
    w.cmp_op = rel; w.in0_sel = IN_RF; w.in1_sel = IN_RF;
    w.rf_raddr0 = RADDR_W'(rs); w.rf_raddr1 = RADDR_W'(rt);
    w.nxt = if_true ? NXT_BRT : NXT_BRF; w.konst = CONST_W'(off);
    return w;
  endfunction

  // pc += off
  function automatic cw_t jmp(int off);
    cw_t w = '0;
    w.nxt = NXT_JUMP; w.konst = CONST_W'(off);
    return w;
  endfunction

endpackage
