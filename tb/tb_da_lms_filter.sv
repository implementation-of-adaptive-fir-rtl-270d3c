// tb_da_lms_filter: end-to-end self-checking test of the adaptive filter at
// its default parameters (N = 4, B = 8, L = 8, mu = 1/4). 3000 samples of a
// system-identification run, checked sample by sample against a bit-exact
// model (see lms_checker), including latency, throughput and convergence.
module tb_da_lms_filter;
  localparam int N = 4, B = 8, L = 8;
  localparam int YW = B + $clog2(N) + 1, EW = YW + 1;
  logic clk = 0;
  logic rst_n, in_valid, in_ready, y_valid, done;
  logic signed [B-1:0] x_in, d_in;
  logic signed [YW-1:0] y_out;
  logic signed [EW-1:0] e_out;
  logic signed [L-1:0] w_out [N];
  int checks, failures;

  da_lms_filter dut (.*);

  lms_checker #(.N(N), .B(B), .L(L), .MU_I(0), .NSAMP(3000)) chk (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
