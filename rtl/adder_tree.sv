// adder_tree: binary tree of two-input adders summing NIN signed words.
//
// Level 0 holds the sign-extended inputs (padded with zeros up to a power of
// two); each level adds neighbouring pairs. Purely combinational; the output
// is OW bits wide and wraps only if the caller sizes OW too small.
// Used by output_adder for the sum-word and carry-word trees.
module adder_tree #(
  parameter int NIN = 4,
  parameter int IW  = 13,
  parameter int OW  = 16
) (
  input  logic signed [IW-1:0] din [NIN],
  output logic signed [OW-1:0] dout
);

  localparam int LV = (NIN > 1) ? $clog2(NIN) : 0;
  localparam int NP = 1 << LV;

  logic signed [OW-1:0] lvl [LV+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++) lvl[0][i] = (i < NIN) ? OW'(din[i]) : '0;
    for (int v = 1; v <= LV; v++) begin
      for (int i = 0; i < NP; i++)
        lvl[v][i] = (i < (NP >> v)) ? lvl[v-1][2*i] + lvl[v-1][2*i+1] : '0;
    end
    dout = lvl[LV][0];
  end

endmodule
