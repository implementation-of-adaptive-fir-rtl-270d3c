// weight_increment: weight registers of P taps with their update cells.
//
// Each tap has a barrel shifter that scales its delayed input x_k by 2^-t
// and an adder/subtractor that adds the result to the weight when the error
// sign is 0 and subtracts it when the sign is 1:
//     w_k <= w_k +/- (x_k >>> t)      when upd && ctrl.nz.
// Weights are L-bit signed and wrap on overflow; reset clears them.
// Timing: the update is applied on the clock edge where `upd` is high; the
// shifters and adders are combinational in front of the registers.
// Barrel shifters plus adder/subtractor cells follow the design; wrapping
// and reset-to-zero are this implementation's choices.
module weight_increment
  import da_lms_pkg::*;
#(
  parameter int P_TAPS = P,
  parameter int B      = 8,
  parameter int L      = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                upd,
  input  upd_ctrl_t           ctrl,
  input  logic signed [B-1:0] x_old [P_TAPS],
  output logic signed [L-1:0] w_q   [P_TAPS]
);

  logic signed [B-1:0] shifted [P_TAPS];
  logic signed [L-1:0] incr    [P_TAPS];
  logic signed [L-1:0] w_next  [P_TAPS];

  for (genvar k = 0; k < P_TAPS; k++) begin : g_tap
    barrel_shifter #(.W(B), .SW(SHW)) u_bsh (
      .din(x_old[k]), .shamt(ctrl.shamt), .dout(shifted[k])
    );
    always_comb begin
      incr[k]   = L'(shifted[k]);
      w_next[k] = ctrl.sgn ? w_q[k] - incr[k] : w_q[k] + incr[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < P_TAPS; k++) w_q[k] <= '0;
    end else if (upd && ctrl.nz) begin
      for (int k = 0; k < P_TAPS; k++) w_q[k] <= w_next[k];
    end
  end

endmodule
