// tb_tap_delay_line: self-checking test of the tapped delay line.
// Shifts random samples in at random times and compares all taps and the
// look-ahead vector with a software copy of the line after every clock.
module tb_tap_delay_line;
  localparam int N = 4, B = 8;
  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [B-1:0] x_in = '0;
  logic signed [B-1:0] taps [N+1];
  logic signed [B-1:0] taps_next [N];
  int checks = 0, failures = 0;
  int model [N+1];

  tap_delay_line #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= N; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      x_in  = B'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(taps_next[k]) != (k == 0 ? int'(x_in) : model[k-1])) begin
          failures++;
          if (failures < 5) $display("next %0d: got %0d want %0d", k, taps_next[k], (k == 0 ? int'(x_in) : model[k-1]));
        end
      end
      @(posedge clk);
      if (shift) begin
        for (int k = N; k > 0; k--) model[k] = model[k-1];
        model[0] = int'(x_in);
      end
      #1;
      for (int k = 0; k <= N; k++) begin
        checks++;
        if (int'(taps[k]) != model[k]) begin
          failures++;
          if (failures < 5) $display("tap %0d: got %0d want %0d", k, taps[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
