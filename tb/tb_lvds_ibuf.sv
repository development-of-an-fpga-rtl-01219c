`timescale 1ns / 1ps
// tb_lvds_ibuf: self-checking testbench of the lvds_ibuf model.
// Applies all four input combinations of the pair, and a random differential
// bit stream, and checks the output: the true line for a valid pair, the
// fail-safe high level for an open or shorted pair.
module tb_lvds_ibuf;
  logic i, ib, o;
  int checks = 0, failures = 0;

  lvds_ibuf dut (.i, .ib, .o);

  task automatic apply(input logic p, input logic n, input logic exp);
    i = p; ib = n;
    #1;
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL i=%b ib=%b o=%b exp=%b", p, n, o, exp);
    end
  endtask

  initial begin
    apply(1'b1, 1'b0, 1'b1);
    apply(1'b0, 1'b1, 1'b0);
    apply(1'b0, 1'b0, 1'b1);
    apply(1'b1, 1'b1, 1'b1);
    for (int k = 0; k < 32; k++) begin
      logic b;
      b = 1'($urandom);
      apply(b, ~b, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
