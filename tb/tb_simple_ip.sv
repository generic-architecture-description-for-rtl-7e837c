// tb_simple_ip: end-to-end test of the simple NISC IP running a program.
//
// The program (control words built with nisc_asm_pkg) is written into the
// control memory while reset is held. It walks a 16-word array in data
// memory computing the sum, the signed maximum and the count of negative
// values, multiplies two numbers by repeated addition, and exercises NOT,
// SUB, an unsigned comparison written back as a value, load/store by
// register and by constant address, and an unconditional jump over a word
// that must not execute. It ends on a jump to itself.
// Results in data memory are compared with values computed here from the
// input data, and the cycle count is compared with the count of control
// words the program must execute (one word per cycle).
module tb_simple_ip;
  import nisc_pkg::*;
  import nisc_asm_pkg::*;

  localparam int N = 16, BASE = 100;

  logic              clk = 0, reset, prog_we;
  logic [PC_W-1:0]   prog_addr, pc;
  cw_t               prog_data;
  logic [31:0]       dm_r, dm_addr, dm_w;
  logic              dm_readEn, dm_writeEn;
  int checks = 0, failures = 0;
  cw_t               prog [$];
  int                halt_pc;

  simple_ip dut (.clk, .reset, .prog_we, .prog_addr, .prog_data,
                 .dm_r, .dm_addr, .dm_w, .dm_readEn, .dm_writeEn, .pc);
  data_mem_model #(.WORDS(1024)) dmem (.clk, .addr(dm_addr), .wdata(dm_w),
                 .readEn(dm_readEn), .writeEn(dm_writeEn), .rdata(dm_r));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int x [N];
    int sum = 0, mx, negs = 0, ma, mb, mc, exp_cycles, cycles;
    int ups = 0;

    // input data
    for (int i = 0; i < N; i++) x[i] = $urandom_range(0, 2000) - 1000;
    ma = $urandom_range(0, 5000) - 2500;
    mb = $urandom_range(3, 20);
    mc = $urandom;
    mx = x[0];
    for (int i = 0; i < N; i++) begin
      sum += x[i];
      if (x[i] < 0) negs++;
      if (x[i] > mx) begin mx = x[i]; ups++; end
    end

    // program
    prog.push_back(clr(0));                          // 0  r0 = 0
    prog.push_back(li(1, BASE));                     // 1  r1 = ptr
    prog.push_back(li(2, BASE + N));                 // 2  r2 = end
    prog.push_back(clr(3));                          // 3  r3 = sum
    prog.push_back(ld_k(4, BASE));                   // 4  r4 = max = x[0]
    prog.push_back(clr(5));                          // 5  r5 = negatives
    prog.push_back(ld_r(6, 1));                      // 6  loop: r6 = x[i]
    prog.push_back(alu_rr(ALU_ADD, 3, 3, 6));        // 7  sum += x
    prog.push_back(set_rr(CMP_LT, 7, 6, 0));         // 8  r7 = x < 0
    prog.push_back(alu_rr(ALU_ADD, 5, 5, 7));        // 9  negs += r7
    prog.push_back(br_rr(CMP_LE, 1, 6, 4, 2));       // 10 if x <= max skip
    prog.push_back(alu_ri(ALU_ADD, 4, 6, 0));        // 11 max = x
    prog.push_back(alu_ri(ALU_ADD, 1, 1, 1));        // 12 ptr++
    prog.push_back(br_rr(CMP_LT, 1, 1, 2, -7));      // 13 if ptr < end loop
    prog.push_back(st_k(200, 3));                    // 14
    prog.push_back(st_k(201, 4));                    // 15
    prog.push_back(st_k(202, 5));                    // 16
    prog.push_back(ld_k(8, 210));                    // 17 r8 = a
    prog.push_back(ld_k(9, 211));                    // 18 r9 = b
    prog.push_back(clr(10));                         // 19 r10 = product
    prog.push_back(br_rr(CMP_EQ, 1, 9, 0, 4));       // 20 if b == 0 done
    prog.push_back(alu_rr(ALU_ADD, 10, 10, 8));      // 21 mul: p += a
    prog.push_back(alu_ri(ALU_SUB, 9, 9, 1));        // 22 b--
    prog.push_back(br_rr(CMP_NE, 1, 9, 0, -2));      // 23 if b != 0 mul
    prog.push_back(st_k(203, 10));                   // 24
    prog.push_back(ld_k(11, 212));                   // 25 r11 = c
    prog.push_back(alu_rr(ALU_NOT, 12, 11, 0));      // 26 r12 = ~c
    prog.push_back(st_k(204, 12));                   // 27
    prog.push_back(alu_rr(ALU_SUB, 13, 11, 8));      // 28 r13 = c - a
    prog.push_back(li(14, 205));                     // 29 r14 = 205
    prog.push_back(st_r(14, 13));                    // 30 mem[r14] = r13
    prog.push_back(set_rr(CMP_GEU, 15, 11, 8));      // 31 r15 = c >=u a
    prog.push_back(st_k(206, 15));                   // 32
    prog.push_back(jmp(2));                          // 33 skip next word
    prog.push_back(st_k(207, 8));                    // 34 must not run
    prog.push_back(st_k(208, 8));                    // 35
    halt_pc = prog.size();
    prog.push_back(jmp(0));                          // 36 halt

    exp_cycles = 6 + 7 * N + ups + 3 + 4 + 3 * mb + (halt_pc - 24 - 1);

    reset = 1; prog_we = 0; prog_addr = '0; prog_data = '0;
    @(negedge clk);
    dmem.mem[207] = 32'd12345;
    for (int i = 0; i < N; i++) dmem.mem[BASE + i] = x[i];
    dmem.mem[210] = ma; dmem.mem[211] = mb; dmem.mem[212] = mc;
    foreach (prog[a]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = PC_W'(a); prog_data = prog[a];
      chk(32'(dm_writeEn), 0, "memory write during reset");
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); reset = 0;
    cycles = 0;
    while (pc != PC_W'(halt_pc)) begin
      @(negedge clk);
      cycles++;
    end
    repeat (3) @(negedge clk);
    chk(32'(pc), halt_pc, "halt word holds the pc");
    chk(dmem.mem[200], sum, "sum");
    chk(dmem.mem[201], mx, "signed maximum");
    chk(dmem.mem[202], negs, "negative count");
    chk(dmem.mem[203], ma * mb, "product by repeated addition");
    chk(dmem.mem[204], ~mc, "not");
    chk(dmem.mem[205], mc - ma, "sub, store by register address");
    chk(dmem.mem[206], 32'(unsigned'(mc) >= unsigned'(ma)), "unsigned compare written back");
    chk(dmem.mem[207], 12345, "jumped-over word executed");
    chk(dmem.mem[208], ma, "word after jump");
    chk(cycles, exp_cycles, "cycles to reach the halt word");
    $display("cycles=%0d expected=%0d", cycles, exp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
