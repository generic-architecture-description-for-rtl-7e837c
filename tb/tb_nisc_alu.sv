// tb_nisc_alu: self-checking test of the ALU functional unit.
// Drives corner and random operands through every control code and compares
// with results computed here. The unit is combinational: results are
// checked 1 ns after the inputs change.
module tb_nisc_alu;
  import nisc_pkg::*;
  logic [31:0] i0, i1, o, exp_o;
  alu_op_e     ctrl;
  int checks = 0, failures = 0;

  nisc_alu #(.BIT_WIDTH(32)) dut (.i0, .i1, .ctrl, .o);

  task automatic check(input logic [31:0] a, input logic [31:0] b, input alu_op_e op);
    i0 = a; i1 = b; ctrl = op;
    #1;
    case (op)
      ALU_ADD: exp_o = a + b;
      ALU_SUB: exp_o = a + (~b) + 32'd1;
      ALU_NOT: exp_o = a ^ 32'hFFFF_FFFF;
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
    logic [31:0] corner [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int k = 0; k < 4; k++) check(corner[x], corner[y], alu_op_e'(k));
    repeat (400) check($urandom, $urandom, alu_op_e'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
