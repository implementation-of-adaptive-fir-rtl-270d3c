// tb_csa_accumulator: self-checking test of the carry-save shift accumulator.
// Runs random accumulations of L partial sums, LSB slice first, and checks
// sum_q + carry_q = floor((init_sum + init_carry + sum_j 2^j p_j) / 2^L)
// after the last step, plus that the words hold while en is low.
module tb_csa_accumulator;
  localparam int W = 13, L = 8;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [W-1:0] p = '0, init_sum = '0, init_carry = '0;
  logic signed [W-1:0] sum_q, carry_q;
  int checks = 0, failures = 0;

  csa_accumulator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_div(longint a, int sh);
    return a >>> sh;  // arithmetic shift = floor division by 2^sh
  endfunction

  initial begin
    longint acc, want, got;
    int pv;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      init_sum   = W'(int'($urandom % 1025) - 512);
      init_carry = W'($urandom % 256);
      acc = longint'(init_sum) + longint'(init_carry);
      for (int j = 0; j < L; j++) begin
        pv = (it % 4 == 0) ? ((j % 2) ? 512 : -512) : int'($urandom % 1025) - 512;
        p = W'(pv);
        first = (j == 0);
        en = 1;
        acc += longint'(pv) <<< j;
        @(negedge clk);
      end
      en = 0;
      first = 0;
      p = W'($urandom);
      want = floor_div(acc, L);
      repeat (1 + $urandom % 2) begin
        got = longint'(sum_q) + longint'(carry_q);
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 5) $display("it %0d: got %0d want %0d", it, got, want);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
