// tb_data_computing_block: self-checking test of a 16-tap data computing
// block (four 4-point inner-product blocks with their weight updates and the
// two adder trees). Each round applies a random weight update, checks all 16
// weights against a model, loads a random input vector, runs the L slices
// and checks sum_word + carry_word = sum over the four blocks of
// floor(sum_k x_k w_k / 2^(L-1)) one cycle after the last slice.
module tb_data_computing_block;
  import da_lms_pkg::*;
  localparam int NBLK = 4, B = 8, L = 8, T = P * NBLK;
  localparam int W = acc_width(B, L), SW = 3, OW = W + 2;
  logic clk = 0, rst_n = 0, load = 0, first = 0, en = 0, upd = 0;
  logic signed [B-1:0] x_next [T], x_old [T];
  logic [SW-1:0] slice = '0;
  upd_ctrl_t upd_cmd = '0;
  logic signed [OW-1:0] sum_word, carry_word;
  logic signed [L-1:0] w_out [T];
  int checks = 0, failures = 0;
  int wm [T], xs [T];

  data_computing_block #(.NBLK(NBLK), .B(B), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrapl(int v);
    return int'($signed(L'(v)));
  endfunction

  initial begin
    longint acc, want, got;
    int d;
    for (int k = 0; k < T; k++) begin x_next[k] = '0; x_old[k] = '0; wm[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 1500; it++) begin
      // weight update
      @(negedge clk);
      upd = 1;
      upd_cmd.sgn = $urandom % 2;
      upd_cmd.nz = (it < 2) || ($urandom % 8 != 0);
      upd_cmd.shamt = (it < 2) ? '0 : SHW'($urandom % 8);
      for (int k = 0; k < T; k++) x_old[k] = B'($urandom);
      @(posedge clk);
      if (upd_cmd.nz)
        for (int k = 0; k < T; k++) begin
          d = int'(x_old[k]) >>> int'(upd_cmd.shamt);
          wm[k] = wrapl(upd_cmd.sgn ? wm[k] - d : wm[k] + d);
        end
      @(negedge clk);
      upd = 0;
      for (int k = 0; k < T; k++) begin
        checks++;
        if (int'(w_out[k]) != wm[k]) failures++;
      end
      // inner product
      for (int k = 0; k < T; k++) begin
        xs[k] = int'($signed(B'($urandom)));
        x_next[k] = B'(xs[k]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < T; k++) x_next[k] = B'($urandom);
      for (int j = 0; j < L; j++) begin
        slice = SW'(j);
        first = (j == 0);
        en = 1;
        @(negedge clk);
      end
      en = 0;
      first = 0;
      want = 0;
      for (int b = 0; b < NBLK; b++) begin
        acc = 0;
        for (int k = P*b; k < P*b + P; k++) acc += longint'(xs[k]) * longint'(wm[k]);
        want += acc >>> (L - 1);
      end
      got = longint'(sum_word) + longint'(carry_word);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 5) $display("it %0d: got %0d want %0d", it, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
