// tb_nisc_rf: self-checking test of the 2-read/1-write register file.
// Writes every register, then mixes random writes and reads against a
// reference array kept here. Checks that reads are combinational, that a
// write is visible only after its clock edge, and that we = 0 writes nothing.
module tb_nisc_rf;
  logic        clk = 0;
  logic [4:0]  raddr0, raddr1, waddr;
  logic        we;
  logic [31:0] w0, r0, r1;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  nisc_rf #(.BIT_WIDTH(32), .REG_COUNT(32)) dut (.clk, .raddr0, .raddr1, .waddr, .we, .w0, .r0, .r1);

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr0 = 0; raddr1 = 0; waddr = 0; w0 = 0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; waddr = 5'(r); w0 = $urandom; ref_regs[r] = w0;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 32; r++) begin
      raddr0 = 5'(r); raddr1 = 5'(31 - r); #1;
      chk(r0, ref_regs[r], "r0 after fill");
      chk(r1, ref_regs[31 - r], "r1 after fill");
    end
    repeat (500) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); w0 = $urandom;
      raddr0 = waddr; raddr1 = 5'($urandom);
      #1;
      // before the edge the old value is read
      chk(r0, ref_regs[raddr0], "r0 before write edge");
      chk(r1, ref_regs[raddr1], "r1");
      @(posedge clk);
      if (we) ref_regs[waddr] = w0;
      #1;
      chk(r0, ref_regs[raddr0], "r0 after write edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
