// csa_accumulator: carry-save shift accumulator for bit-serial DA.
//
// Each enabled cycle adds one signed partial sum p to the stored (sum, carry)
// pair with a row of full adders (no carry propagation) and moves the result
// one place to the right, so slices arrive LSB first and the total is
//     value = sum + carry = floor((init + sum_j 2^j p_j) / 2^L).
// The full adders give s + 2c = a + b + p exactly for W-bit signed vectors;
// storing s>>>1 and c keeps both words at the same weight and drops one exact
// result bit per step. On `first` the pair (init_sum, init_carry) replaces
// the stored pair, which starts a new accumulation without a clear cycle.
// Timing: one register stage; the words are valid one cycle after the last
// enabled step and stay until the next enabled step.
// The carry-save shift accumulation follows the design; shifting the sum
// word inside each step and the initial pair are this implementation's.
module csa_accumulator #(
  parameter int W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                first,
  input  logic signed [W-1:0] p,
  input  logic signed [W-1:0] init_sum,
  input  logic signed [W-1:0] init_carry,
  output logic signed [W-1:0] sum_q,
  output logic signed [W-1:0] carry_q
);

  logic signed [W-1:0] a, b, s, c;

  always_comb begin
    a = first ? init_sum   : sum_q;
    b = first ? init_carry : carry_q;
    s = a ^ b ^ p;
    c = (a & b) | (a & p) | (b & p);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= s >>> 1;
      carry_q <= c;
    end
  end

endmodule
