// obc_da_table: the 8-register distributed-arithmetic table of one 4-point
// inner-product block, in offset binary coding (OBC).
//
// With OBC every weight bit b stands for c = 2b-1 in {-1,+1}, so the table
// for a 4-point product would hold D(a) = sum_k c_k * x_k for the 16 bit
// patterns a. Since D(~a) = -D(a), only the 8 patterns with a[3] = 0 are
// stored; the reader folds the other 8 onto them by complementing the
// address and negating the entry. Entry m therefore holds
//     T[m] = sum_{k<3} (m[k] ? x_k : -x_k) - x_3 ,
// which is twice the usual OBC value (kept as an integer). T[0] = -(x_0+x_1+
// x_2+x_3) doubles as the OBC offset term.
// Interface: on `load` the entries are computed from x_vec by a small adder
// network and registered; they stay constant for the L bit-slice cycles.
// The 8-entry folded table follows the design; the adder network that fills
// it and the doubling are this implementation's choices.
module obc_da_table
  import da_lms_pkg::*;
#(
  parameter int B  = 8,
  parameter int TW = tbl_width(B)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [B-1:0]  x_vec   [P],
  output logic signed [TW-1:0] table_q [TBL_N]
);

  logic signed [TW-1:0] xs [P];
  logic signed [TW-1:0] pair01 [4];   // +/-x0 +/-x1
  logic signed [TW-1:0] pair2n3 [2];  // +/-x2 - x3
  logic signed [TW-1:0] entry [TBL_N];

  always_comb begin
    for (int k = 0; k < P; k++) xs[k] = TW'(x_vec[k]);
    for (int m = 0; m < 4; m++)
      pair01[m] = (m[0] ? xs[0] : -xs[0]) + (m[1] ? xs[1] : -xs[1]);
    pair2n3[0] = -xs[2] - xs[3];
    pair2n3[1] =  xs[2] - xs[3];
    for (int m = 0; m < TBL_N; m++)
      entry[m] = pair01[m % 4] + pair2n3[m / 4];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < TBL_N; m++) table_q[m] <= '0;
    end else if (load) begin
      for (int m = 0; m < TBL_N; m++) table_q[m] <= entry[m];
    end
  end

endmodule
