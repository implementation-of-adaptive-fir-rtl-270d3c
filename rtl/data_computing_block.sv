// data_computing_block: a group of NBLK 4-point inner-product blocks with
// their weight-increment blocks; by default four of them, i.e. 16 taps.
//
// Every 4-tap block has its own OBC DA table, carry-save accumulator,
// weights, barrel shifters and adder/subtractor cells. All blocks share the
// slice sequencing and the update command (error sign and shift t). At the
// end of the L slices, one binary adder tree adds the blocks' sum words and
// a second adds their carry words. The group therefore hands on a single
// (sum, carry) pair, whose total is the sum of the per-block results
// floor(sum_k x_k w_k / 2^(L-1)).
// Interface/timing: as inner_product_block for load/slice/first/en; the
// output pair is valid in the cycle after the last slice. The weights change
// on the edge where `upd` is high (and the command's nz bit is set).
// Grouping four 4-point blocks and their weight-increment blocks into a
// 16-tap unit that outputs one sum word and one carry word follows the
// design; NBLK may be set lower for filters shorter than 16 taps.
module data_computing_block
  import da_lms_pkg::*;
#(
  parameter int NBLK = 4,
  parameter int B    = 8,
  parameter int L    = 8,
  parameter int W    = acc_width(B, L),
  parameter int SW   = (L > 1) ? $clog2(L) : 1,
  parameter int OW   = W + ((NBLK > 1) ? $clog2(NBLK) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [B-1:0]  x_next [P*NBLK],
  input  logic signed [B-1:0]  x_old  [P*NBLK],
  input  logic [SW-1:0]        slice,
  input  logic                 first,
  input  logic                 en,
  input  logic                 upd,
  input  upd_ctrl_t            upd_cmd,
  output logic signed [OW-1:0] sum_word,
  output logic signed [OW-1:0] carry_word,
  output logic signed [L-1:0]  w_out  [P*NBLK]
);

  logic signed [W-1:0] sums    [NBLK];
  logic signed [W-1:0] carries [NBLK];

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic signed [B-1:0] xv   [P];
    logic signed [B-1:0] xo   [P];
    logic signed [L-1:0] wv   [P];

    always_comb begin
      for (int k = 0; k < P; k++) begin
        xv[k]           = x_next[P*b + k];
        xo[k]           = x_old[P*b + k];
        w_out[P*b + k]  = wv[k];
      end
    end

    weight_increment #(.P_TAPS(P), .B(B), .L(L)) u_winc (
      .clk, .rst_n, .upd, .ctrl(upd_cmd), .x_old(xo), .w_q(wv)
    );

    inner_product_block #(.B(B), .L(L), .W(W), .SW(SW)) u_ipb (
      .clk, .rst_n, .load, .x_next(xv), .w(wv), .slice, .first, .en,
      .sum_q(sums[b]), .carry_q(carries[b])
    );
  end

  adder_tree #(.NIN(NBLK), .IW(W), .OW(OW)) u_sum_tree   (.din(sums),    .dout(sum_word));
  adder_tree #(.NIN(NBLK), .IW(W), .OW(OW)) u_carry_tree (.din(carries), .dout(carry_word));

endmodule
