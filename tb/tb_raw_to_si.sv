`timescale 1ns / 1ps
// tb_raw_to_si: self-checking testbench of raw_to_si.
//
// Applies a new random operand set (raw value, offset, factor, add/subtract)
// on every clock, including the extreme codes, and checks that the product
// of each set appears exactly three clocks later, so that both the latency
// of three and the throughput of one result per clock are verified.
module tb_raw_to_si;
  localparam int unsigned AW = 16, BW = 18, DW = 16;
  localparam int N = 400;

  logic clk = 1'b0;
  logic subadd;
  logic signed [AW-1:0] ain;
  logic signed [BW-1:0] bin;
  logic signed [DW-1:0] din;
  logic signed [AW+BW:0] mult;
  longint expected [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  raw_to_si #(.AWIDTH(AW), .BWIDTH(BW), .DWIDTH(DW)) dut (.clk, .subadd, .ain, .bin, .din, .mult);

  initial begin
    for (int i = 0; i < N + 3; i++) begin
      @(negedge clk);
      // the product of the set applied three cycles ago
      if (i >= 3) begin
        checks++;
        if (longint'(mult) != expected[i-3]) begin
          failures++;
          $display("FAIL set %0d: got %0d exp %0d", i-3, mult, expected[i-3]);
        end
      end
      if (i < N) begin
        case (i)
          0: begin ain = 16'sh7fff; din = 16'sh7fff; bin = 18'sh1ffff; subadd = 0; end
          1: begin ain = 16'sh8000; din = 16'sh8000; bin = 18'sh20000; subadd = 0; end
          2: begin ain = 16'sh8000; din = 16'sh7fff; bin = 18'sh20000; subadd = 1; end
          default: begin
            ain = AW'($urandom); din = DW'($urandom); bin = BW'($urandom);
            subadd = 1'($urandom);
          end
        endcase
        expected[i] = subadd ? (longint'(ain) - longint'(din)) * longint'(bin)
                             : (longint'(ain) + longint'(din)) * longint'(bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
