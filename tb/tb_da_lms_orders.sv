// tb_da_lms_orders: the filter lengths N = 8, 16 and 32 (two, four and eight
// 4-point inner-product blocks combined by the adder trees), plus N = 8 with
// the smaller step size mu = 2^-1/N (MU_I = 1) and N = 32 with 12-bit
// weights (finer weight resolution, so adaptation continues to small errors),
// each in its own
// system-identification run checked bit-exactly against lms_checker's model.
module tb_da_lms_orders;
  localparam int B = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks [5], failures [5];
  logic done [5];

  for (genvar i = 0; i < 5; i++) begin : g_n
    localparam int N  = (i == 3) ? 8 : (i == 4) ? 32 : (8 << i);
    localparam int MU = (i == 3) ? 1 : 0;
    localparam int L  = (i == 4) ? 12 : 8;
    localparam int YW = B + $clog2(N) + 1, EW = YW + 1;
    logic rst_n, in_valid, in_ready, y_valid;
    logic signed [B-1:0] x_in, d_in;
    logic signed [YW-1:0] y_out;
    logic signed [EW-1:0] e_out;
    logic signed [L-1:0] w_out [N];

    da_lms_filter #(.N(N), .B(B), .L(L), .MU_I(MU)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .y_valid, .y_out,
      .e_out, .w_out
    );
    lms_checker #(.N(N), .B(B), .L(L), .MU_I(MU), .NSAMP(4000)) chk (
      .clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .y_valid, .y_out,
      .e_out, .w_out, .done(done[i]), .checks(checks[i]), .failures(failures[i])
    );
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3] + checks[4],
             failures[0] + failures[1] + failures[2] + failures[3] + failures[4] + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3] + checks[4],
             failures[0] + failures[1] + failures[2] + failures[3] + failures[4]);
    $finish;
  end
endmodule
