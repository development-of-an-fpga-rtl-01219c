`timescale 1ns / 1ps
// tb_lvds_obuf: self-checking testbench of the lvds_obuf model.
// Drives a random bit stream and checks that the true output follows the
// input and the complementary output is its inverse.
module tb_lvds_obuf;
  logic i, o, ob;
  int checks = 0, failures = 0;

  lvds_obuf dut (.i, .o, .ob);

  initial begin
    for (int k = 0; k < 40; k++) begin
      i = (k < 2) ? 1'(k) : 1'($urandom);
      #1;
      checks++;
      if (o !== i || ob !== ~i) begin
        failures++;
        $display("FAIL i=%b o=%b ob=%b", i, o, ob);
      end
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
