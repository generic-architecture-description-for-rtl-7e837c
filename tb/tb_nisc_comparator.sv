// tb_nisc_comparator: self-checking test of the comparator unit.
// Every relation is checked on corner and random operand pairs against a
// reference computed here from 33-bit sign/zero-extended values.
module tb_nisc_comparator;
  import nisc_pkg::*;
  logic [31:0] i0, i1;
  logic        o, exp_o;
  cmp_op_e     ctrl;
  int checks = 0, failures = 0;

  nisc_comparator #(.BIT_WIDTH(32)) dut (.i0, .i1, .ctrl, .o);

  task automatic check(input logic [31:0] a, input logic [31:0] b, input cmp_op_e op);
    logic signed [32:0] sa, sb;
    logic        [32:0] ua, ub;
    sa = {a[31], a}; sb = {b[31], b};
    ua = {1'b0, a};  ub = {1'b0, b};
    i0 = a; i1 = b; ctrl = op;
    #1;
    case (op)
      CMP_EQ:  exp_o = (ua == ub);
      CMP_NE:  exp_o = (ua != ub);
      CMP_LT:  exp_o = (sa <  sb);
      CMP_LE:  exp_o = (sa <= sb);
      CMP_GT:  exp_o = (sa >  sb);
      CMP_GE:  exp_o = (sa >= sb);
      CMP_LTU: exp_o = (ua <  ub);
      CMP_GEU: exp_o = (ua >= ub);
      default: exp_o = 1'b0;
    endcase
    checks++;
    if (o !== exp_o) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %b want %b", op, a, b, o, exp_o);
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
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5};
    for (int x = 0; x < 6; x++)
      for (int y = 0; y < 6; y++)
        for (int k = 0; k < 8; k++) check(corner[x], corner[y], cmp_op_e'(k));
    repeat (400) begin
      logic [31:0] a = $urandom;
      check(a, ($urandom_range(0, 3) == 0) ? a : $urandom, cmp_op_e'($urandom_range(0, 7)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
