// tb_cdct_alu: self-checking test of the DCT datapath's loop-control ALU.
// Drives corner and random operands through all four control codes (add,
// and, or, and the unused code, which must give zero) and compares with
// results computed here, using the bit-field forms the DCT program relies
// on as well (n & 56, n & 7, base | offset). Combinational: results are
// checked 1 ns after the inputs change.
module tb_cdct_alu;
  import cdct_pkg::*;
  logic [31:0] i0, i1, o, exp_o;
  cdct_alu_e   ctrl;
  int checks = 0, failures = 0;

  cdct_alu #(.BIT_WIDTH(32)) dut (.i0, .i1, .ctrl, .o);

  task automatic check(input logic [31:0] a, input logic [31:0] b, input cdct_alu_e op);
    i0 = a; i1 = b; ctrl = op;
    #1;
    case (op)
      CA_ADD:  exp_o = a + b;
      CA_AND:  for (int k = 0; k < 32; k++) exp_o[k] = a[k] && b[k];
      CA_OR:   for (int k = 0; k < 32; k++) exp_o[k] = a[k] || b[k];
      default: exp_o = 32'd0;
    endcase
    checks++;
    if (o !== exp_o) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h want %h", op, a, b, o, exp_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h38};
    foreach (corners[a])
      foreach (corners[b])
        for (int op = 0; op < 4; op++) check(corners[a], corners[b], cdct_alu_e'(op));
    // merged-loop index arithmetic: row and column fields of n, pointers
    for (int n = 0; n < 64; n++) begin
      check(32'(n), 32'd56, CA_AND);
      checks++;
      if (o !== 32'(8 * (n / 8))) begin failures++; $display("FAIL 8*row of n=%0d", n); end
      check(32'(n), 32'd7, CA_AND);
      checks++;
      if (o !== 32'(n % 8)) begin failures++; $display("FAIL column of n=%0d", n); end
      check(32'd192, 32'(n), CA_OR);
      checks++;
      if (o !== 32'(192 + n)) begin failures++; $display("FAIL base | offset n=%0d", n); end
      check(32'(n), 32'd1, CA_ADD);
    end
    repeat (400) check($urandom, $urandom, cdct_alu_e'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
