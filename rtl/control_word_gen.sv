// control_word_gen: derives the barrel-shifter control word t from the error
// magnitude.
//
// The step size mu * e is rounded to a power of two: a leading-one detector
// finds p = floor(log2 |e|), and t = TOFF - p is clamped to [0, TMAX], so
// that x_k >>> t approximates mu * |e| * x_k in weight units (TOFF comes from
// da_lms_pkg::t_offset). `nz` enables the update; it is 0 when the error is
// zero and also when TOFF - p exceeds TMAX, i.e. when the increment would be
// smaller than one weight LSB (a dead zone: an arithmetic shift would turn
// such an increment into a biased -1 or 0). Combinational.
// Generating t from the error magnitude follows the design; the leading-one
// rule, the clamping and the dead zone are this implementation's choices.
module control_word_gen
  import da_lms_pkg::*;
#(
  parameter int EW   = 12,
  parameter int TOFF = 9,
  parameter int TMAX = 7
) (
  input  logic [EW-1:0]  mag,
  output logic [SHW-1:0] t,
  output logic           nz
);

  int p;
  int tv;

  always_comb begin
    p = 0;
    for (int i = 0; i < EW; i++) if (mag[i]) p = i;
    tv = TOFF - p;
    nz = (|mag) && (tv <= TMAX);
    if (tv < 0)    tv = 0;
    if (tv > TMAX) tv = TMAX;
    t = SHW'(tv);
  end

endmodule
