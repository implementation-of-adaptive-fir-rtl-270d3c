// tb_weight_increment: self-checking test of the weight registers and their
// barrel-shifter / adder-subtractor cells. Random commands; checks
// w_k += x_k >>> t for sign 0, -= for sign 1, no change for nz = 0 or
// upd = 0, and L-bit wrap-around. Counts additions, subtractions and holds.
module tb_weight_increment;
  import da_lms_pkg::*;
  localparam int B = 8, L = 8;
  logic clk = 0, rst_n = 0, upd = 0;
  upd_ctrl_t ctrl = '0;
  logic signed [B-1:0] x_old [P];
  logic signed [L-1:0] w_q [P];
  int checks = 0, failures = 0, n_add = 0, n_sub = 0, n_hold = 0;
  int model [P];

  weight_increment #(.P_TAPS(P), .B(B), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int v);
    return int'($signed(L'(v)));
  endfunction

  initial begin
    int xv, d;
    for (int k = 0; k < P; k++) begin model[k] = 0; x_old[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      upd = ($urandom % 4) != 0;
      ctrl.sgn = $urandom % 2;
      ctrl.nz = ($urandom % 8) != 0;
      ctrl.shamt = SHW'($urandom % 9);
      for (int k = 0; k < P; k++) x_old[k] = B'($urandom);
      @(posedge clk);
      if (upd && ctrl.nz) begin
        if (ctrl.sgn) n_sub++; else n_add++;
        for (int k = 0; k < P; k++) begin
          xv = int'(x_old[k]);
          d = xv >>> int'(ctrl.shamt);
          model[k] = wrap(ctrl.sgn ? model[k] - d : model[k] + d);
        end
      end else n_hold++;
      #1;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (int'(w_q[k]) != model[k]) begin
          failures++;
          if (failures < 5) $display("it %0d w%0d=%0d want %0d", it, k, w_q[k], model[k]);
        end
      end
    end
    $display("adds=%0d subs=%0d holds=%0d", n_add, n_sub, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
