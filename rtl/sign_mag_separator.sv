// sign_mag_separator: splits a two's-complement error into a sign bit and a
// magnitude. Combinational. The magnitude keeps the full EW bits unsigned, so
// the most negative value is represented exactly.
// The separation follows the design; the magnitude width is this
// implementation's choice.
module sign_mag_separator #(
  parameter int EW = 12
) (
  input  logic signed [EW-1:0] e,
  output logic                 sgn,
  output logic [EW-1:0]        mag
);

  always_comb begin
    sgn = e[EW-1];
    mag = sgn ? EW'(-e) : EW'(e);
  end

endmodule
