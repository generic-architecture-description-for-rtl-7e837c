// tb_nisc_mux: self-checking test of the multiplexer component.
// Checks a 2-input and a 3-input instance (the shapes used in the IP) for
// every select value, including the unused select of the 3-input one,
// which must give zero.
module tb_nisc_mux;
  logic [1:0][31:0] i2;
  logic [2:0][31:0] i3;
  logic             s2;
  logic [1:0]       s3;
  logic [31:0]      o2, o3, e;
  int checks = 0, failures = 0;

  nisc_mux #(.N(2), .W(32)) dut2 (.i(i2), .sel(s2), .o(o2));
  nisc_mux #(.N(3), .W(32)) dut3 (.i(i3), .sel(s3), .o(o3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      for (int k = 0; k < 2; k++) i2[k] = $urandom;
      for (int k = 0; k < 3; k++) i3[k] = $urandom;
      s2 = 1'($urandom);
      s3 = 2'($urandom);
      #1;
      e = s2 ? i2[1] : i2[0];
      checks++;
      if (o2 !== e) begin failures++; $display("FAIL mux2 sel=%0d got %h want %h", s2, o2, e); end
      case (s3)
        2'd0: e = i3[0];
        2'd1: e = i3[1];
        2'd2: e = i3[2];
        default: e = 32'd0;
      endcase
      checks++;
      if (o3 !== e) begin failures++; $display("FAIL mux3 sel=%0d got %h want %h", s3, o3, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
