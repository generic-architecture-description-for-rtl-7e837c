// tb_mac_datapath: self-checking test of the ADD/MUL/MAC datapath.
// Random operation sequences are compared with a reference accumulator
// each cycle; every operation completes in one cycle. The operand gating is
// checked by looking at the inputs of the multiplier and the adder: they
// must be zero whenever their unit is unused, and carry the operands when
// it is used. Multiply-accumulate chains of up to 8 steps are included.
module tb_mac_datapath;
  logic        clk = 0, reset;
  logic [1:0]  op;
  logic [31:0] a, b, acc, acc_ref;
  int checks = 0, failures = 0;
  int n_add = 0, n_mul = 0, n_mac = 0, n_nop = 0, n_gated_mul = 0, n_gated_add = 0;

  mac_datapath #(.W(32), .GATING(1'b1)) dut (.clk, .reset, .op, .a, .b, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (op=%0d a=%h b=%h)", what, op, a, b); end
  endtask

  initial begin
    reset = 1; op = 0; a = 0; b = 0; acc_ref = 0;
    @(negedge clk); @(negedge clk);
    reset = 0;
    chk(acc === 32'd0, "acc not cleared by reset");
    for (int c = 0; c < 2000; c++) begin
      op = (c % 10 < 4) ? 2'd3 : 2'($urandom);
      a = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 20)) : $urandom;
      b = $urandom;
      #1;
      // gating of the unit inputs
      if (op == 2'd1 || op == 2'd0) begin
        chk(dut.mul_i0 === 0 && dut.mul_i1 === 0, "multiplier inputs not gated");
        n_gated_mul++;
      end else
        chk(dut.mul_i0 === a && dut.mul_i1 === b, "multiplier inputs gated while in use");
      if (op == 2'd2 || op == 2'd0) begin
        chk(dut.add_i0 === 0 && dut.add_i1 === 0, "adder inputs not gated");
        n_gated_add++;
      end
      case (op)
        2'd1: begin acc_ref = a + b;           n_add++; end
        2'd2: begin acc_ref = a * b;           n_mul++; end
        2'd3: begin acc_ref = acc_ref + a * b; n_mac++; end
        default: n_nop++;
      endcase
      @(negedge clk);
      chk(acc === acc_ref, $sformatf("acc %h want %h", acc, acc_ref));
    end
    chk(n_add > 0 && n_mul > 0 && n_mac > 0 && n_nop > 0 && n_gated_mul > 0 && n_gated_add > 0,
        "an operation never occurred");
    $display("add=%0d mul=%0d mac=%0d nop=%0d", n_add, n_mul, n_mac, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
