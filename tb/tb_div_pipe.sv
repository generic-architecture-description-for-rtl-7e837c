// tb_div_pipe: self-checking test of the pipelined divider.
// Issues divisions back to back at the maximum rate (one every two cycles),
// then with random gaps of 2 to 5 cycles, holding the operands for the two
// cycles the core requires. Each result is compared with the C-style signed
// quotient and remainder computed here, and must appear exactly 8 cycles
// after its start, with done high in that cycle only. Operands include
// zero, +-1, the most negative value and division by zero.
module tb_div_pipe;
  logic        clk = 0, reset, start, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0, cycle = 0;
  int issued = 0, completed = 0, max_in_flight = 0;

  typedef struct { int t; logic [31:0] q, r; } exp_t;
  exp_t pending [$];

  div_pipe #(.W(32), .STAGES(4)) dut (.clk, .reset, .start, .dividend, .divisor, .quotient, .remainder, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t ref_div(input logic [31:0] a, input logic [31:0] b, input int t);
    exp_t e;
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

  // result checker: sampled just before each rising edge
  always @(negedge clk) if (!reset) begin
    exp_t e;
    if (pending.size() > 0 && pending[0].t == cycle) begin
      e = pending.pop_front();
      checks++;
      if (!done || quotient !== e.q || remainder !== e.r) begin
        failures++;
        $display("FAIL cycle %0d done=%b q=%h r=%h want q=%h r=%h", cycle, done, quotient, remainder, e.q, e.r);
      end
      completed++;
    end else if (done) begin
      checks++; failures++;
      $display("FAIL unexpected done at cycle %0d", cycle);
    end
    if (pending.size() > max_in_flight) max_in_flight = pending.size();
  end

  task automatic issue(input logic [31:0] a, input logic [31:0] b, input int gap);
    @(negedge clk);
    start = 1; dividend = a; divisor = b;
    pending.push_back(ref_div(a, b, cycle));
    issued++;
    @(negedge clk);
    start = 0;
    repeat (gap - 2) begin
      @(negedge clk);
      dividend = $urandom; divisor = $urandom;   // operands free again
    end
  endtask

  initial begin
    logic [31:0] edge_v [7] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd7, 32'hFFFF_FFF9};
    reset = 1; start = 0; dividend = 0; divisor = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int x = 0; x < 7; x++)
      for (int y = 0; y < 7; y++) issue(edge_v[x], edge_v[y], 2);
    repeat (300) issue($urandom, ($urandom_range(0, 1) ? $urandom : 32'($urandom_range(1, 300))), 2);
    repeat (300) issue($urandom, $urandom >> $urandom_range(0, 31), $urandom_range(2, 5));
    repeat (12) @(negedge clk);
    checks++;
    if (completed != issued || pending.size() != 0) begin
      failures++;
      $display("FAIL issued %0d completed %0d", issued, completed);
    end
    checks++;
    if (max_in_flight < 4) begin
      failures++;
      $display("FAIL pipeline never held 4 divisions at once");
    end
    $display("issued=%0d completed=%0d max_in_flight=%0d", issued, completed, max_in_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
