// tb_inner_product_block: self-checking test of the 4-point DA inner product.
// Loads random and extreme input vectors and weights, runs the L bit slices
// and checks sum_q + carry_q = floor(sum_k x_k w_k / 2^(L-1)) one cycle after
// the last slice, and that the result takes exactly L cycles. Counts the
// slices that used a folded (complemented) address, the MSB-slice negation,
// and both together.
module tb_inner_product_block;
  import da_lms_pkg::*;
  localparam int B = 8, L = 8, W = acc_width(B, L), SW = 3;
  logic clk = 0, rst_n = 0, load = 0, first = 0, en = 0;
  logic signed [B-1:0] x_next [P];
  logic signed [L-1:0] w [P];
  logic [SW-1:0] slice = '0;
  logic signed [W-1:0] sum_q, carry_q;
  int checks = 0, failures = 0;
  int n_fold = 0, n_msb = 0, n_both = 0, n_early = 0;
  int xs [P], ws [P];

  inner_product_block #(.B(B), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_signed(int bits);
    return int'($urandom % (1 << bits)) - (1 << (bits - 1));
  endfunction

  initial begin
    longint dot, want, got;
    for (int k = 0; k < P; k++) begin x_next[k] = '0; w[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      dot = 0;
      for (int k = 0; k < P; k++) begin
        case (it)
          0: begin xs[k] = -(1 << (B-1)); ws[k] = -(1 << (L-1)); end
          1: begin xs[k] = -(1 << (B-1)); ws[k] = (1 << (L-1)) - 1; end
          2: begin xs[k] = (1 << (B-1)) - 1; ws[k] = -(1 << (L-1)); end
          default: begin xs[k] = rnd_signed(B); ws[k] = rnd_signed(L); end
        endcase
        x_next[k] = B'(xs[k]);
        w[k] = L'(ws[k]);
        dot += longint'(xs[k]) * longint'(ws[k]);
      end
      want = dot >>> (L - 1);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < P; k++) x_next[k] = B'($urandom);  // ignored after load
      for (int j = 0; j < L; j++) begin
        slice = SW'(j);
        first = (j == 0);
        en = 1;
        if (w[P-1][j] && j != L - 1) n_fold++;
        if (!w[P-1][j] && j == L - 1) n_msb++;
        if (w[P-1][j] && j == L - 1) n_both++;
        @(negedge clk);
        // the result must not be ready before the last slice is clocked
        if (j == L - 2) begin
          got = longint'(sum_q) + longint'(carry_q);
          if (got == want && it > 3) n_early++;
        end
      end
      en = 0;
      first = 0;
      got = longint'(sum_q) + longint'(carry_q);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 5) $display("it %0d: got %0d want %0d", it, got, want);
      end
    end
    // a result that is always ready one slice early would mean the block
    // ignores the MSB slice; allow chance agreement only
    checks++;
    if (n_early > 300) failures++;
    checks++;
    if (n_fold == 0 || n_msb == 0 || n_both == 0) failures++;
    $display("folded slices=%0d msb negations=%0d both=%0d", n_fold, n_msb, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
