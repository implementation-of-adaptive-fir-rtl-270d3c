// error_unit: the error-generating circuit, e(n) = d(n) - y(n).
//
// d(n) is captured when the sample is accepted and copied to a second
// register at the end of the last bit slice, because a back-to-back next
// sample overwrites the first register on that same edge. In the cycle after
// the last slice (`fin`) the final-adder output y is registered together with
// the difference d - y, and `valid_q` pulses for one cycle.
// Timing: y_q/e_q change one cycle after `fin`, i.e. two cycles after the
// last slice edge; they hold until the next result.
// The subtraction follows the design; the capture registers are this
// implementation's.
module error_unit #(
  parameter int B  = 8,
  parameter int YW = 11,
  parameter int EW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 accept,
  input  logic signed [B-1:0]  d_in,
  input  logic                 last,
  input  logic                 fin,
  input  logic signed [YW-1:0] y,
  output logic signed [YW-1:0] y_q,
  output logic signed [EW-1:0] e_q,
  output logic                 valid_q
);

  logic signed [B-1:0] d_hold, d_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_hold  <= '0;
      d_err   <= '0;
      y_q     <= '0;
      e_q     <= '0;
      valid_q <= 1'b0;
    end else begin
      if (accept) d_hold <= d_in;
      if (last)   d_err  <= d_hold;
      valid_q <= fin;
      if (fin) begin
        y_q <= y;
        e_q <= EW'(d_err) - EW'(y);
      end
    end
  end

endmodule
