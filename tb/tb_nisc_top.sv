// tb_nisc_top: end-to-end test of the top level, all parameters at their
// defaults.
//
// Four activities run at the same time:
//   * the NISC IP runs a program that divides K pairs of positive numbers
//     from data memory by repeated subtraction and stores quotients and
//     remainders, then stores a NOT result and halts on a self-jump;
//   * the divider core receives the same K pairs and then a stream of random
//     signed pairs, issued at its full rate of one every two cycles and with
//     gaps, plus a division by zero;
//   * the MAC datapath computes a K-element dot product with MAC, then ADD
//     and MUL operations and idle cycles.
// All results are compared with values computed here; the IP's cycle count
// and the divider's 8-cycle latency are checked. Every mechanism (branch
// taken / not taken, jump, load, store, each ALU operation, comparator
// write-back, divider at full rate with 4 divisions in flight, each MAC
// operation, gated unit inputs, all four DCT pipeline stages busy in one
// cycle) is counted and must occur at least once.
module tb_nisc_top;
  import nisc_pkg::*;
  import nisc_asm_pkg::*;
  import cdct_pkg::cdct_cw_t;
  import cdct_asm_pkg::emit_product, cdct_asm_pkg::halt, cdct_asm_pkg::c1_entry;
  import cdct_asm_pkg::SETUP_WORDS, cdct_asm_pkg::BODY_WORDS;

  localparam int K = 12, A_BASE = 100, B_BASE = 120, Q_BASE = 140, R_BASE = 160;

  logic              clk = 0, reset;
  logic              ip_prog_we, ip_dm_readEn, ip_dm_writeEn;
  logic [PC_W-1:0]   ip_prog_addr, ip_pc;
  cw_t               ip_prog_data;
  logic [31:0]       ip_dm_r, ip_dm_addr, ip_dm_w;
  logic              div_start, div_done;
  logic [31:0]       div_dividend, div_divisor, div_quotient, div_remainder;
  logic [1:0]        mac_op;
  logic [31:0]       mac_a, mac_b, mac_acc;
  logic              dct_prog_we, dct_dw_en;
  logic [cdct_pkg::PC_W-1:0] dct_prog_addr, dct_pc;
  cdct_cw_t          dct_prog_data;
  logic [31:0]       dct_da_addr, dct_da_r, dct_db_addr, dct_db_r, dct_dw_addr, dct_dw_data;

  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_br_taken = 0, n_br_not = 0, n_jump = 0, n_load = 0, n_store = 0;
  int n_add = 0, n_sub = 0, n_not = 0, n_cmp_wb = 0, n_const = 0;
  int n_div = 0, n_div_fullrate = 0, n_div_inflight4 = 0, n_div_zero = 0;
  int n_mac_add = 0, n_mac_mul = 0, n_mac_mac = 0, n_mac_gated = 0;
  int n_dct_all4 = 0;

  nisc_top dut (.*);

  data_mem_model #(.WORDS(1024)) dmem (.clk, .addr(ip_dm_addr), .wdata(ip_dm_w),
      .readEn(ip_dm_readEn), .writeEn(ip_dm_writeEn), .rdata(ip_dm_r));

  data_mem_2r1w_model #(.WORDS(512)) dctmem (.clk, .ra_addr(dct_da_addr), .ra_data(dct_da_r),
      .rb_addr(dct_db_addr), .rb_data(dct_db_r), .w_addr(dct_dw_addr), .w_data(dct_dw_data),
      .wen(dct_dw_en));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d (%h) want %0d (%h)", what, $signed(got), got, $signed(want), want);
    end
  endtask

  // observe the IP's control word every cycle
  always @(negedge clk) if (!reset) begin
    cw_t w;
    w = dut.ip.cw;
    if (w.nxt == NXT_JUMP && w.konst != 0) n_jump++;
    if (w.nxt == NXT_BRT || w.nxt == NXT_BRF) begin
      if ((w.nxt == NXT_BRT) == dut.ip.comp_o) n_br_taken++; else n_br_not++;
    end
    if (w.dm_re) n_load++;
    if (w.dm_we) n_store++;
    if (w.rf_we && w.out0_sel == OUT_CMP) n_cmp_wb++;
    if (w.rf_we && w.out0_sel == OUT_ALU) begin
      if (w.alu_op == ALU_ADD) n_add++;
      if (w.alu_op == ALU_SUB) n_sub++;
      if (w.alu_op == ALU_NOT) n_not++;
    end
    if (w.rf_we && (w.in0_sel == IN_CONST || w.in1_sel == IN_CONST)) n_const++;
    if (mac_op != 2'd3 && dut.mac.mul_i0 == 0 && dut.mac.mul_i1 == 0) n_mac_gated++;
    if (dut.dct.cw.agu_en && dut.dct.cw.ld_en && dut.dct.cw.mul_en && dut.dct.cw.acc_en) n_dct_all4++;
  end

  // ---------------- NISC IP ----------------
  int a_v [K], b_v [K];
  cw_t prog [$];
  int halt_pc, ip_cycles, ip_exp_cycles;

  task automatic run_ip();
    prog.push_back(clr(0));                          // 0
    prog.push_back(li(1, A_BASE));                   // 1 ptr
    prog.push_back(li(2, A_BASE + K));               // 2 end
    prog.push_back(ld_r(3, 1));                      // 3 loop: a
    prog.push_back(alu_ri(ALU_ADD, 4, 1, B_BASE - A_BASE)); // 4
    prog.push_back(ld_r(5, 4));                      // 5 b
    prog.push_back(clr(6));                          // 6 q = 0
    prog.push_back(br_rr(CMP_LT, 1, 3, 5, 4));       // 7 while a >= b
    prog.push_back(alu_rr(ALU_SUB, 3, 3, 5));        // 8   a -= b
    prog.push_back(alu_ri(ALU_ADD, 6, 6, 1));        // 9   q++
    prog.push_back(jmp(-3));                         // 10
    prog.push_back(alu_ri(ALU_ADD, 7, 1, Q_BASE - A_BASE)); // 11
    prog.push_back(st_r(7, 6));                      // 12 store q
    prog.push_back(alu_ri(ALU_ADD, 7, 1, R_BASE - A_BASE)); // 13
    prog.push_back(st_r(7, 3));                      // 14 store r
    prog.push_back(alu_ri(ALU_ADD, 1, 1, 1));        // 15 ptr++
    prog.push_back(br_rr(CMP_NE, 1, 1, 2, -13));     // 16 next pair
    prog.push_back(alu_rr(ALU_NOT, 8, 0, 0));        // 17 r8 = ~0
    prog.push_back(set_rr(CMP_GT, 9, 0, 8));         // 18 r9 = 0 > -1
    prog.push_back(st_k(200, 8));                    // 19
    prog.push_back(st_k(201, 9));                    // 20
    halt_pc = prog.size();
    prog.push_back(jmp(0));                          // 21 halt

    ip_exp_cycles = 3 + (halt_pc - 17);
    for (int i = 0; i < K; i++) begin
      a_v[i] = $urandom_range(0, 400);
      b_v[i] = $urandom_range(1, 40);
      dmem.mem[A_BASE + i] = a_v[i];
      dmem.mem[B_BASE + i] = b_v[i];
      ip_exp_cycles += 11 + 4 * (a_v[i] / b_v[i]);
    end
    foreach (prog[a]) begin
      @(negedge clk);
      ip_prog_we = 1; ip_prog_addr = PC_W'(a); ip_prog_data = prog[a];
    end
    @(negedge clk);
    ip_prog_we = 0;
  endtask

  task automatic wait_ip();
    ip_cycles = 0;
    while (ip_pc != PC_W'(halt_pc)) begin
      @(negedge clk);
      ip_cycles++;
    end
    repeat (2) @(negedge clk);
    for (int i = 0; i < K; i++) begin
      chk(dmem.mem[Q_BASE + i], a_v[i] / b_v[i], $sformatf("IP quotient %0d", i));
      chk(dmem.mem[R_BASE + i], a_v[i] % b_v[i], $sformatf("IP remainder %0d", i));
    end
    chk(dmem.mem[200], 32'hFFFF_FFFF, "IP not");
    chk(dmem.mem[201], 1, "IP signed compare write-back");
    chk(ip_cycles, ip_exp_cycles, "IP cycle count");
    $display("IP: %0d cycles (expected %0d)", ip_cycles, ip_exp_cycles);
  endtask

  // ---------------- divider ----------------
  typedef struct { int t; logic [31:0] q, r; } dexp_t;
  dexp_t dpend [$];
  int last_start = -10;

  function automatic dexp_t div_ref(input logic [31:0] a, input logic [31:0] b, input int t);
    dexp_t e;
    logic [31:0] ma, mb, uq, ur;
    ma = a[31] ? -a : a;
    mb = b[31] ? -b : b;
    if (mb == 0) begin uq = 32'hFFFF_FFFF; ur = ma; end
    else begin uq = ma / mb; ur = ma % mb; end
    e.t = t + 8;
    e.q = (a[31] ^ b[31]) ? -uq : uq;
    e.r = a[31] ? -ur : ur;
    return e;
  endfunction

  always @(negedge clk) if (!reset) begin
    dexp_t e;
    if (dpend.size() > 0 && dpend[0].t == cycle) begin
      e = dpend.pop_front();
      checks++;
      if (!div_done || div_quotient !== e.q || div_remainder !== e.r) begin
        failures++;
        $display("FAIL divider at cycle %0d: done=%b q=%h r=%h want q=%h r=%h",
                 cycle, div_done, div_quotient, div_remainder, e.q, e.r);
      end
    end else if (div_done) begin
      checks++; failures++;
      $display("FAIL divider: unexpected done at cycle %0d", cycle);
    end
    if (dpend.size() >= 4) n_div_inflight4++;
  end

  task automatic div_issue(input logic [31:0] a, input logic [31:0] b, input int gap);
    @(negedge clk);
    div_start = 1; div_dividend = a; div_divisor = b;
    if (cycle - last_start == 2) n_div_fullrate++;
    if (b == 0) n_div_zero++;
    last_start = cycle;
    dpend.push_back(div_ref(a, b, cycle));
    n_div++;
    @(negedge clk);
    div_start = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  task automatic run_div();
    for (int i = 0; i < K; i++) div_issue(a_v[i], b_v[i], 2);
    div_issue(32'hFFFF_FF85, 32'd0, 2);
    repeat (200) div_issue($urandom, $urandom >> $urandom_range(0, 31), $urandom_range(2, 4));
    repeat (10) @(negedge clk);
    chk(dpend.size(), 0, "divider results outstanding");
  endtask

  // ---------------- MAC datapath ----------------
  task automatic run_mac();
    logic [31:0] dot = 0, r;
    logic [31:0] x, y;
    @(negedge clk);
    mac_op = 2'd2; mac_a = 0; mac_b = 0;           // acc = 0 * 0
    @(negedge clk);
    for (int i = 0; i < K; i++) begin
      x = $urandom; y = $urandom;
      mac_op = 2'd3; mac_a = x; mac_b = y;
      dot = dot + x * y;
      n_mac_mac++;
      @(negedge clk);
      chk(mac_acc, dot, $sformatf("MAC step %0d", i));
    end
    mac_op = 2'd0; @(negedge clk);
    chk(mac_acc, dot, "MAC holds when idle");
    x = $urandom; y = $urandom;
    mac_op = 2'd1; mac_a = x; mac_b = y; n_mac_add++;
    @(negedge clk);
    chk(mac_acc, x + y, "ADD");
    mac_op = 2'd2; mac_a = x; mac_b = y; n_mac_mul++;
    @(negedge clk);
    r = x * y;
    chk(mac_acc, r, "MUL");
    mac_op = 2'd0;
  endtask

  // ---------------- pipelined DCT datapath ----------------
  int dct_c1 [8][8], dct_f [8][8], dct_t [8][8], dct_o [8][8];
  cdct_cw_t dprog [$];
  int dct_halt;

  task automatic load_dct();
    for (int u = 0; u < 8; u++)
      for (int n = 0; n < 8; n++) begin
        dct_c1[u][n] = c1_entry(u, n);
        dct_f[u][n]  = $urandom_range(0, 255);
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        dct_t[i][j] = 0;
        for (int k = 0; k < 8; k++) dct_t[i][j] += dct_c1[i][k] * dct_f[k][j];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        dct_o[i][j] = 0;
        for (int k = 0; k < 8; k++) dct_o[i][j] += dct_t[i][k] * dct_c1[j][k];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        dctmem.mem[8 * i + j]       = dct_c1[i][j];
        dctmem.mem[64 + 8 * i + j]  = dct_f[i][j];
        dctmem.mem[192 + 8 * i + j] = dct_c1[j][i];
      end
    emit_product(dprog, 0, 64, 128);
    emit_product(dprog, 128, 192, 256);
    dct_halt = dprog.size();
    dprog.push_back(halt());
    foreach (dprog[a]) begin
      @(negedge clk);
      dct_prog_we = 1; dct_prog_addr = cdct_pkg::PC_W'(a); dct_prog_data = dprog[a];
    end
    @(negedge clk);
    dct_prog_we = 0;
  endtask

  task automatic wait_dct();
    int cycles = 0;
    while (dct_pc != cdct_pkg::PC_W'(dct_halt)) begin
      @(negedge clk);
      cycles++;
    end
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        chk(dctmem.mem[256 + 8 * i + j], dct_o[i][j], $sformatf("DCT F[%0d][%0d]", i, j));
    chk(cycles, 2 * (SETUP_WORDS + 64 * BODY_WORDS), "DCT cycle count");
    $display("DCT: %0d cycles", cycles);
  endtask

  initial begin
    reset = 1;
    dct_prog_we = 0; dct_prog_addr = '0; dct_prog_data = '0;
    ip_prog_we = 0; ip_prog_addr = '0; ip_prog_data = '0;
    div_start = 0; div_dividend = 0; div_divisor = 0;
    mac_op = 0; mac_a = 0; mac_b = 0;
    @(negedge clk);
    run_ip();
    load_dct();
    @(negedge clk);
    reset = 0;
    fork
      wait_dct();
      wait_ip();
      run_div();
      run_mac();
    join
    if (n_br_taken == 0)  begin failures++; $display("FAIL no branch taken"); end
    if (n_br_not == 0)    begin failures++; $display("FAIL no branch not taken"); end
    if (n_jump == 0)      begin failures++; $display("FAIL no jump"); end
    if (n_load == 0)      begin failures++; $display("FAIL no load"); end
    if (n_store == 0)     begin failures++; $display("FAIL no store"); end
    if (n_add == 0 || n_sub == 0 || n_not == 0) begin failures++; $display("FAIL an ALU operation never ran"); end
    if (n_cmp_wb == 0)    begin failures++; $display("FAIL no comparator write-back"); end
    if (n_const == 0)     begin failures++; $display("FAIL no constant operand"); end
    if (n_div_fullrate == 0)  begin failures++; $display("FAIL divider never at full rate"); end
    if (n_div_inflight4 == 0) begin failures++; $display("FAIL divider never held 4 divisions"); end
    if (n_div_zero == 0)  begin failures++; $display("FAIL no division by zero"); end
    if (n_mac_add == 0 || n_mac_mul == 0 || n_mac_mac == 0) begin failures++; $display("FAIL a MAC operation never ran"); end
    if (n_mac_gated == 0) begin failures++; $display("FAIL multiplier inputs never gated"); end
    if (n_dct_all4 == 0) begin failures++; $display("FAIL DCT pipeline never full"); end
    checks += 14;
    $display("IP: branch taken=%0d not taken=%0d jump=%0d load=%0d store=%0d add=%0d sub=%0d not=%0d cmp-wb=%0d const=%0d",
             n_br_taken, n_br_not, n_jump, n_load, n_store, n_add, n_sub, n_not, n_cmp_wb, n_const);
    $display("divider: issued=%0d full-rate=%0d cycles-with-4-in-flight=%0d by-zero=%0d",
             n_div, n_div_fullrate, n_div_inflight4, n_div_zero);
    $display("MAC: mac=%0d add=%0d mul=%0d gated-multiplier cycles=%0d", n_mac_mac, n_mac_add, n_mac_mul, n_mac_gated);
    $display("DCT: cycles with all four stages busy=%0d", n_dct_all4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
