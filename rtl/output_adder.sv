// output_adder: forms the filter output y from the sum and carry words of
// the NB data computing blocks (NB = 1 up to 16 taps, N/16 beyond).
//
// One binary adder tree adds the NB sum words, a second adds the NB carry
// words, and a final adder adds the two totals, truncated to the YW-bit
// output (the true value always fits). Sum and carry words already have
// equal weight, so no carry-in bits are needed; with NB = 1 this is the
// final adder that adds one sum word to its carry word. Purely combinational.
// The two trees and the final adder follow the design; equal weighting of
// sum and carry words is this implementation's choice (see csa_accumulator).
module output_adder #(
  parameter int NB = 1,
  parameter int W  = 13,
  parameter int YW = 11
) (
  input  logic signed [W-1:0]  sums    [NB],
  input  logic signed [W-1:0]  carries [NB],
  output logic signed [YW-1:0] y
);

  localparam int TW = W + ((NB > 1) ? $clog2(NB) : 0) + 1;

  logic signed [TW-1:0] sum_tot, carry_tot, y_full;

  adder_tree #(.NIN(NB), .IW(W), .OW(TW)) u_sum_tree   (.din(sums),    .dout(sum_tot));
  adder_tree #(.NIN(NB), .IW(W), .OW(TW)) u_carry_tree (.din(carries), .dout(carry_tot));

  always_comb begin
    y_full = sum_tot + carry_tot;
    y      = YW'(y_full);
  end

endmodule
