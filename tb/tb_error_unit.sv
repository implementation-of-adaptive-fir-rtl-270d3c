// tb_error_unit: self-checking test of the error circuit.
// Drives accept/last/fin in the order the controller produces them, with
// back-to-back and spaced samples, and checks y_q, e_q = d - y and the
// one-cycle valid pulse timing.
module tb_error_unit;
  localparam int B = 8, YW = 11, EW = 12;
  logic clk = 0, rst_n = 0, accept = 0, last = 0, fin = 0;
  logic signed [B-1:0] d_in = '0;
  logic signed [YW-1:0] y = '0, y_q;
  logic signed [EW-1:0] e_q;
  logic valid_q;
  int checks = 0, failures = 0, n_b2b = 0;

  error_unit #(.B(B), .YW(YW), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dcur, dnext, yv;
    bit b2b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    dcur = int'($signed(B'($urandom)));
    d_in = B'(dcur); accept = 1;
    @(negedge clk);
    accept = 0; d_in = B'($urandom);
    for (int it = 0; it < 1000; it++) begin
      repeat (3) @(negedge clk);          // slices in between
      b2b = $urandom % 2;
      last = 1;
      dnext = int'($signed(B'($urandom)));
      if (b2b) begin accept = 1; d_in = B'(dnext); n_b2b++; end
      @(negedge clk);
      last = 0; accept = 0; d_in = B'($urandom);
      fin = 1;
      yv = int'($urandom % 2049) - 1024;
      y = YW'(yv);
      checks++;
      if (valid_q) failures++;
      @(negedge clk);
      fin = 0;
      y = YW'($urandom);
      checks += 3;
      if (!valid_q) failures++;
      if (int'(y_q) != yv) failures++;
      if (int'(e_q) != dcur - yv) begin
        failures++;
        if (failures < 5) $display("e got %0d want %0d", e_q, dcur - yv);
      end
      @(negedge clk);
      checks++;
      if (valid_q) failures++;
      if (!b2b) begin
        accept = 1; d_in = B'(dnext);
        @(negedge clk);
        accept = 0; d_in = B'($urandom);
      end
      dcur = dnext;
    end
    $display("back-to-back samples=%0d", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
