// barrel_shifter: logarithmic arithmetic right shifter, dout = din >>> shamt.
//
// Stage i shifts by 2^i when shamt[i] is set, filling with the sign bit, so a
// shift takes SW levels of 2:1 multiplexers. Shifts of W or more give all
// sign bits. Combinational.
// A right-shifting barrel shifter follows the design; the staging is this
// implementation's.
module barrel_shifter #(
  parameter int W  = 8,
  parameter int SW = 5
) (
  input  logic signed [W-1:0] din,
  input  logic [SW-1:0]       shamt,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] stage [SW+1];

  always_comb begin
    stage[0] = din;
    for (int i = 0; i < SW; i++) begin
      if (!shamt[i])           stage[i+1] = stage[i];
      else if ((1 << i) >= W)  stage[i+1] = {W{stage[i][W-1]}};
      else                     stage[i+1] = stage[i] >>> (1 << i);
    end
    dout = stage[SW];
  end

endmodule
