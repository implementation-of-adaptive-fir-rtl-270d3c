// tb_output_adder: self-checking test of the adder trees and final adder.
// Four blocks (N = 16): random sum and carry words whose total fits the
// output; checks y = sum of all words. Also runs a one-block instance.
module tb_output_adder;
  localparam int W = 13, YW4 = 13, YW1 = 11;
  logic signed [W-1:0] sums [4], carries [4];
  logic signed [W-1:0] s1 [1], c1 [1];
  logic signed [YW4-1:0] y4;
  logic signed [YW1-1:0] y1;
  int checks = 0, failures = 0;

  output_adder #(.NB(4), .W(W), .YW(YW4)) dut4 (.sums, .carries, .y(y4));
  output_adder #(.NB(1), .W(W), .YW(YW1)) dut1 (.sums(s1), .carries(c1), .y(y1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot, a, b;
    for (int it = 0; it < 5000; it++) begin
      tot = 0;
      for (int i = 0; i < 4; i++) begin
        // each block value a + b within +/-512, split arbitrarily
        b = int'($urandom % 2001) - 1000;
        a = int'($urandom % 1025) - 512 - b;
        sums[i] = W'(a);
        carries[i] = W'(b);
        tot += a + b;
      end
      a = int'($urandom % 1025) - 512;
      b = int'($urandom % 2001) - 1000;
      s1[0] = W'(a - b);
      c1[0] = W'(b);
      #1;
      checks += 2;
      if (int'(y4) != tot) begin
        failures++;
        if (failures < 5) $display("y4 got %0d want %0d", y4, tot);
      end
      if (int'(y1) != a) begin
        failures++;
        if (failures < 5) $display("y1 got %0d want %0d", y1, a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
