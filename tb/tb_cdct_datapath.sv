// tb_cdct_datapath: the 8x8 2D DCT on the pipelined DCT datapath.
//
// Builds the integer DCT matrix C1 = round(1024 * C), with
// C[u][n] = cos((2n+1)u*pi/16) / 8, and a random 8x8 block f of 8-bit
// pixels, places C1, f and C2 = C1 transposed in data memory, and runs a
// program that computes T = C1 x f and then F = T x C2 as two matrix
// products. Each product is one merged loop over the 64 output elements;
// the 8 multiply-accumulates of an element are unrolled and enter the
// four-stage pipeline on consecutive cycles, while the loop-control words
// (counter, pointers, branch) overlap the pipeline's drain.
//
// Three datapaths run side by side, with 0, 1 and 2 controller pipeline
// registers (CTRL_PIPE = P). Their programs differ only in the P no-op delay
// slots behind each loop branch and behind the halt. For each, both result
// matrices are compared with products computed here, and the run must take
// exactly P + 2 * (7 + 64 * (15 + P)) cycles: P cycles to fill the
// controller pipeline after reset, 7 set-up words and 15 + P words per
// output element. Each controller stage therefore costs 128 cycles plus one
// fill cycle. Pipeline activity is counted: every stage must be active, and
// all four at once, in some cycle.
module tb_cdct_datapath;
  import nisc_pkg::*;
  import cdct_pkg::*;
  import cdct_asm_pkg::*;

  localparam int C1_BASE = 0, F_BASE = 64, T_BASE = 128, C2_BASE = 192, OUT_BASE = 256;
  localparam int NCFG = 3;

  logic clk = 0;
  int   checks = 0, failures = 0;
  int   c1 [8][8], f [8][8], t [8][8], fo [8][8];
  bit   ready = 0;
  bit   done [NCFG];
  int   run_cycles [NCFG];

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, $signed(got), $signed(want));
    end
  endtask

  // reference matrices, shared by all configurations
  initial begin
    for (int u = 0; u < 8; u++)
      for (int n = 0; n < 8; n++) begin
        c1[u][n] = c1_entry(u, n);
        f[u][n]  = $urandom_range(0, 255);
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 8; k++) t[i][j] += c1[i][k] * f[k][j];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        fo[i][j] = 0;
        for (int k = 0; k < 8; k++) fo[i][j] += t[i][k] * c1[j][k];
      end
    ready = 1;
  end

  for (genvar p = 0; p < NCFG; p++) begin : g_cfg
    logic            reset, prog_we, dw_en;
    logic [PC_W-1:0] prog_addr, pc;
    cdct_cw_t        prog_data;
    logic [31:0]     da_addr, da_r, db_addr, db_r, dw_addr, dw_data;
    int              n_all4 = 0, n_stores = 0;
    cdct_cw_t        prog [$];
    int              halt_pc;

    cdct_datapath #(.CTRL_PIPE(p)) dut (.clk, .reset, .prog_we, .prog_addr, .prog_data,
        .da_addr, .da_r, .db_addr, .db_r, .dw_addr, .dw_data, .dw_en, .pc);
    data_mem_2r1w_model #(.WORDS(512)) dmem (.clk, .ra_addr(da_addr), .ra_data(da_r),
        .rb_addr(db_addr), .rb_data(db_r), .w_addr(dw_addr), .w_data(dw_data), .wen(dw_en));

    always @(negedge clk) if (!reset) begin
      if (dut.cw.agu_en && dut.cw.ld_en && dut.cw.mul_en && dut.cw.acc_en) n_all4++;
      if (dw_en) n_stores++;
    end

    initial begin
      int cycles, exp_cycles;
      reset = 1; prog_we = 0; prog_addr = '0; prog_data = '0;
      wait (ready);
      emit_product(prog, C1_BASE, F_BASE, T_BASE, p);
      emit_product(prog, T_BASE, C2_BASE, OUT_BASE, p);
      halt_pc = prog.size();
      emit_halt(prog, p);
      exp_cycles = p + 2 * (SETUP_WORDS + 64 * (BODY_WORDS + p));

      @(negedge clk);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          dmem.mem[C1_BASE + 8 * i + j] = c1[i][j];
          dmem.mem[F_BASE  + 8 * i + j] = f[i][j];
          dmem.mem[C2_BASE + 8 * i + j] = c1[j][i];
        end
      foreach (prog[a]) begin
        @(negedge clk);
        prog_we = 1; prog_addr = PC_W'(a); prog_data = prog[a];
      end
      @(negedge clk); prog_we = 0;
      @(negedge clk); reset = 0;
      cycles = 0;
      while (pc != PC_W'(halt_pc)) begin
        @(negedge clk);
        cycles++;
      end
      repeat (2 + p) @(negedge clk);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          chk(dmem.mem[T_BASE + 8 * i + j], t[i][j], $sformatf("P=%0d T[%0d][%0d]", p, i, j));
          chk(dmem.mem[OUT_BASE + 8 * i + j], fo[i][j], $sformatf("P=%0d F[%0d][%0d]", p, i, j));
        end
      chk(cycles, exp_cycles, $sformatf("P=%0d DCT cycle count", p));
      chk(n_stores, 128, $sformatf("P=%0d stores", p));
      checks++;
      if (n_all4 == 0) begin failures++; $display("FAIL P=%0d four stages never active together", p); end
      $display("DCT with %0d controller pipeline stage(s): %0d cycles (expected %0d), %0d cycles with all four stages busy",
               p, cycles, exp_cycles, n_all4);
      run_cycles[p] = cycles;
      done[p] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    chk(run_cycles[1] - run_cycles[0], 129, "cost of first controller stage");
    chk(run_cycles[2] - run_cycles[1], 129, "cost of second controller stage");
    $display("F[0][0]=%0d", fo[0][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
