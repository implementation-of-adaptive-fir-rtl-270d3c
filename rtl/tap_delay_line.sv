// tap_delay_line: the input tapped delay line of the adaptive filter.
//
// Holds x(n), x(n-1), ..., x(n-N) in N+1 registers. On `shift` the new sample
// enters tap 0 and every sample moves one tap down. Taps 0..N-1 are the
// current input vector; taps 1..N are the previous one, which the weight
// update needs because it runs one sample behind the filtering (adaptation
// delay 1). `taps_next` is the vector taps 0..N-1 will hold after the shift,
// so the DA tables can be loaded on the same clock edge.
// Timing: one register stage, synchronous active-low reset to zero.
// The delay line itself follows the design; the extra tap and the reset are
// this implementation's choices.
module tap_delay_line #(
  parameter int N = 4,
  parameter int B = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [B-1:0] x_in,
  output logic signed [B-1:0] taps      [N+1],
  output logic signed [B-1:0] taps_next [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= N; k++) taps[k] <= '0;
    end else if (shift) begin
      taps[0] <= x_in;
      for (int k = 1; k <= N; k++) taps[k] <= taps[k-1];
    end
  end

  always_comb begin
    taps_next[0] = x_in;
    for (int k = 1; k < N; k++) taps_next[k] = taps[k-1];
  end

endmodule
