// tb_da_lms_controller: self-checking test of the slice sequencer.
// Offers samples at random times and checks: a sample is taken only when
// idle or in the last slice, every sample gets exactly L slice cycles
// numbered 0..L-1 with first/last on the ends, fin follows last by one
// cycle, and back-to-back samples run every L cycles. Counts back-to-back
// accepts and idle gaps.
module tb_da_lms_controller;
  localparam int L = 8, SW = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, accept, en, first, last, fin;
  logic [SW-1:0] slice;
  int checks = 0, failures = 0, n_b2b = 0, n_gap = 0;

  da_lms_controller #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference sequencer state
  int  exp_slice = -1;    // -1: idle
  bit  exp_fin = 0;
  int  last_accept_cycle = -100, cyc = 0, n_acc = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      #1;
      checks += 6;
      if (en != (exp_slice >= 0)) failures++;
      if (en && int'(slice) != exp_slice) failures++;
      if (first != (exp_slice == 0)) failures++;
      if (last != (exp_slice == L - 1)) failures++;
      if (fin != exp_fin) failures++;
      if (in_ready != (exp_slice < 0 || exp_slice == L - 1)) failures++;
      @(posedge clk);
      cyc++;
      exp_fin = (exp_slice == L - 1);
      if (in_valid && (exp_slice < 0 || exp_slice == L - 1)) begin
        if (cyc - last_accept_cycle == L) n_b2b++;
        else if (n_acc > 0) n_gap++;
        checks++;
        if (n_acc > 0 && cyc - last_accept_cycle < L) failures++;
        last_accept_cycle = cyc;
        n_acc++;
        exp_slice = 0;
      end else if (exp_slice == L - 1) exp_slice = -1;
      else if (exp_slice >= 0) exp_slice++;
    end
    checks++;
    if (n_b2b == 0 || n_gap == 0) failures++;
    $display("accepts=%0d back-to-back=%0d after gap=%0d", n_acc, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
