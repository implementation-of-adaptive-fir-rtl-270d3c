// inner_product_block: 4-point distributed-arithmetic inner product
//     y = floor( sum_{k<4} x_k * w_k / 2^(L-1) )
// with L-bit weights read as Q1.(L-1) fractions and B-bit inputs.
//
// How it works. The weight bits are consumed one slice per cycle, LSB first:
// in slice l the four bits w_k[l] form an address a. Offset binary coding
// writes each weight as w = ((w - ~w) - 1)/2, so slice l contributes
// +/-2^l * D(a) with D(a) = sum_k (2a_k-1) x_k, and the "-1" terms add up to
// D(0000) once. D(a) is fetched from the 8-entry folded table:
//   - if a[3] = 1 the address is complemented and the entry negated
//     (D(~a) = -D(a));
//   - in the MSB slice the contribution is negated once more (the weight's
//     sign bit has weight -2^(L-1)).
// The two negations meet in one sign-control bit that inverts all bits of the
// entry (one's complement). Every inversion is short by +1 at weight 2^l; the
// sum of these missing ones is exactly {~w_3[L-1], w_3[L-2:0]}, the offset-
// binary code of w_3, which is preloaded as the starting carry word. The
// starting sum word is the offset term T[0]. After L steps of the carry-save
// accumulator, sum_q + carry_q is the result.
// Interface/timing: `load` (sample accept) registers the table from x_next.
// The L cycles that follow carry en=1 with slice = 0..L-1 and first=1 on
// slice 0; sum_q/carry_q hold the result from the cycle after slice L-1 until
// the next slice 0 has been clocked. w must not change during the L slices.
// The table, 8:1 multiplexer, XOR sign control and carry-save accumulation
// follow the design; the folding rule and the offset-binary carry preload are
// this implementation's way of making the 8-entry table exact.
module inner_product_block
  import da_lms_pkg::*;
#(
  parameter int B  = 8,
  parameter int L  = 8,
  parameter int W  = acc_width(B, L),
  parameter int SW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [B-1:0] x_next [P],
  input  logic signed [L-1:0] w      [P],
  input  logic [SW-1:0]       slice,
  input  logic                first,
  input  logic                en,
  output logic signed [W-1:0] sum_q,
  output logic signed [W-1:0] carry_q
);

  localparam int TW = tbl_width(B);

  logic signed [TW-1:0] table_q [TBL_N];
  logic [P-1:0]         addr;
  logic [2:0]           idx;
  logic                 neg;
  logic signed [W-1:0]  p, init_sum, init_carry;

  obc_da_table #(.B(B), .TW(TW)) u_table (
    .clk, .rst_n, .load, .x_vec(x_next), .table_q
  );

  always_comb begin
    for (int k = 0; k < P; k++) addr[k] = w[k][slice];
    idx        = addr[P-1] ? ~addr[2:0] : addr[2:0];
    neg        = addr[P-1] ^ (32'(slice) == L - 1);
    p          = W'(table_q[idx]) ^ {W{neg}};
    init_sum   = W'(table_q[0]);
    init_carry = W'({1'b0, ~w[P-1][L-1], w[P-1][L-2:0]});
  end

  csa_accumulator #(.W(W)) u_acc (
    .clk, .rst_n, .en, .first, .p, .init_sum, .init_carry, .sum_q, .carry_q
  );

endmodule
