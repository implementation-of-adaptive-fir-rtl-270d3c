// tb_obc_da_table: self-checking test of the 8-entry OBC DA table.
// Loads random and extreme input vectors and checks every entry against
// T[m] = sum_k c_k x_k with c_k = +1 where bit k of m is set, -1 otherwise,
// and c_3 = -1; also checks that entries hold while load is low.
module tb_obc_da_table;
  import da_lms_pkg::*;
  localparam int B = 8, TW = B + 3;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [B-1:0] x_vec [P];
  logic signed [TW-1:0] table_q [TBL_N];
  int checks = 0, failures = 0;
  int xs [P];

  obc_da_table #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_entry(int m);
    int s = 0;
    for (int k = 0; k < P; k++)
      s += ((k < 3) && ((m >> k) & 1) != 0) ? xs[k] : -xs[k];
    return s;
  endfunction

  initial begin
    for (int k = 0; k < P; k++) x_vec[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int k = 0; k < P; k++) begin
        if (it == 0)      xs[k] = -(1 << (B-1));
        else if (it == 1) xs[k] = (1 << (B-1)) - 1;
        else              xs[k] = int'($signed(B'($urandom)));
        x_vec[k] = B'(xs[k]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < P; k++) x_vec[k] = B'($urandom);  // must be ignored
      @(negedge clk);
      for (int m = 0; m < TBL_N; m++) begin
        checks++;
        if (int'(table_q[m]) != expect_entry(m)) begin
          failures++;
          if (failures < 5) $display("entry %0d: got %0d want %0d", m, table_q[m], expect_entry(m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
