// da_lms_filter: LMS adaptive FIR filter of length N built from 4-point
// distributed-arithmetic (DA) inner-product blocks with offset-binary-coded
// (OBC) tables of 8 entries each.
//
// The taps are grouped into 4-tap inner-product blocks, and up to four such
// blocks into a 16-tap data computing block that delivers one sum word and
// one carry word; longer filters (N = 32, 48, ...) use several data computing
// blocks whose words are added by output_adder.
// Dataflow per sample n (L clock cycles, weight bits LSB first):
//   accept   x(n) enters the tapped delay line; every block loads its OBC
//            table from its 4 taps of the new input vector.
//   L cycles each block accumulates the table entries addressed by one bit
//            slice of its 4 weights (carry-save, no carry propagation).
//   +1 cycle adder trees (in each data computing block and across them) and
//            a final adder form y(n); error_unit
//            registers y(n) and e(n) = d(n) - y(n).
//   +1 cycle the sign-magnitude separator and control word generator turn
//            e(n) into (sign, t), registered as the update command.
//   end of the next sample's last slice: every weight is updated,
//            w_k += sign * (x_k(n) >>> t), with x(n) taken from taps 1..N.
// So the weights used for sample n+1 contain the error of sample n-1:
//     w(n+1) = w(n) + mu * Q(e(n-1)) * x(n-1)      (adaptation delay 1),
// where Q rounds |e| down to a power of two and mu = 2^-MU_I / N. Changing
// the weights only at a slice boundary keeps them constant while they are
// read bit by bit.
// Output: y(n) = sum over blocks of floor(sum_k x_k w_k / 2^(L-1)), with x
// in Q1.(B-1) and w in Q1.(L-1), i.e. y and e are in x units.
// Interface: valid/ready input (one sample per L cycles at most), a one-cycle
// y_valid pulse with y_out/e_out two cycles after the last slice of the
// sample, and the current weights on w_out.
// The structure (DA tables with 8 registers, multiplexers, XOR sign control,
// carry-save accumulation, adder trees, error circuit, sign-magnitude
// separator, control word generator, barrel shifters, adder/subtractor
// cells, mu = 1/N) follows the design. The adaptation delay, the handshake,
// the input width B and the rounding rule of the control word are this
// implementation's choices.
module da_lms_filter
  import da_lms_pkg::*;
#(
  parameter int N    = 4,
  parameter int B    = 8,
  parameter int L    = 8,
  parameter int MU_I = 0,
  localparam int NB   = N / P,
  localparam int NBLK = (NB < 4) ? NB : 4,
  localparam int NDCB = NB / NBLK,
  localparam int W    = acc_width(B, L),
  localparam int YW   = y_width(N, B),
  localparam int EW   = e_width(N, B),
  localparam int SW   = $clog2(L),
  localparam int DW   = W + ((NBLK > 1) ? $clog2(NBLK) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [B-1:0]  x_in,
  input  logic signed [B-1:0]  d_in,
  output logic                 y_valid,
  output logic signed [YW-1:0] y_out,
  output logic signed [EW-1:0] e_out,
  output logic signed [L-1:0]  w_out [N]
);

  localparam int TOFF = t_offset(N, B, L, MU_I);

  // ---------------------------------------------------------------- control
  logic          accept, en, first, last, fin;
  logic [SW-1:0] slice;

  da_lms_controller #(.L(L), .SW(SW)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .accept, .slice, .en, .first, .last,
    .fin
  );

  // ------------------------------------------------------------ delay line
  logic signed [B-1:0] taps      [N+1];
  logic signed [B-1:0] taps_next [N];

  tap_delay_line #(.N(N), .B(B)) u_dline (
    .clk, .rst_n, .shift(accept), .x_in, .taps, .taps_next
  );

  // ------------------------- data computing blocks (inner products, weights)
  logic signed [DW-1:0] sums    [NDCB];
  logic signed [DW-1:0] carries [NDCB];
  upd_ctrl_t            upd_cmd;
  logic                 upd_valid;
  logic                 upd;

  assign upd = last && upd_valid;

  for (genvar g = 0; g < NDCB; g++) begin : g_dcb
    localparam int T = P * NBLK;   // taps per data computing block
    logic signed [B-1:0] xv   [T];
    logic signed [B-1:0] xold [T];
    logic signed [L-1:0] wv   [T];

    always_comb begin
      for (int k = 0; k < T; k++) begin
        xv[k]           = taps_next[T*g + k];
        xold[k]         = taps[T*g + k + 1];
        w_out[T*g + k]  = wv[k];
      end
    end

    data_computing_block #(.NBLK(NBLK), .B(B), .L(L), .W(W), .SW(SW), .OW(DW)) u_dcb (
      .clk, .rst_n, .load(accept), .x_next(xv), .x_old(xold), .slice, .first,
      .en, .upd, .upd_cmd, .sum_word(sums[g]), .carry_word(carries[g]),
      .w_out(wv)
    );
  end

  // ------------------------------------------------------- output and error
  logic signed [YW-1:0] y_sum;

  output_adder #(.NB(NDCB), .W(DW), .YW(YW)) u_oadd (
    .sums, .carries, .y(y_sum)
  );

  error_unit #(.B(B), .YW(YW), .EW(EW)) u_err (
    .clk, .rst_n, .accept, .d_in, .last, .fin, .y(y_sum),
    .y_q(y_out), .e_q(e_out), .valid_q(y_valid)
  );

  // ----------------------------------------------- update command (e -> t)
  logic          e_sgn, e_nz;
  logic [EW-1:0] e_mag;
  logic [SHW-1:0] e_t;

  sign_mag_separator #(.EW(EW)) u_sms (.e(e_out), .sgn(e_sgn), .mag(e_mag));

  control_word_gen #(.EW(EW), .TOFF(TOFF), .TMAX(B - 1)) u_cwg (
    .mag(e_mag), .t(e_t), .nz(e_nz)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upd_cmd   <= '0;
      upd_valid <= 1'b0;
    end else if (y_valid) begin
      upd_cmd   <= '{sgn: e_sgn, nz: e_nz, shamt: e_t};
      upd_valid <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- checks
  initial begin
    assert (N % P == 0 && N >= P && (N <= 16 || N % 16 == 0))
      else $error("N must be 4, 8, 12, 16 or a multiple of 16");
    assert (L >= 3) else $error("L must be at least 3 for the update timing");
    assert (B <= 31 && L <= 31) else $error("B and L must be below 32");
  end

  // the previous sample's update command is ready before the slice that uses it
  a_upd_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                (last && upd_valid) |-> !y_valid);

endmodule
