// da_lms_controller: sequencing of the bit-serial DA adaptive filter.
//
// A sample is accepted (accept = in_valid && in_ready) when the filter is idle
// or in the last bit slice of the previous sample, so samples can follow each
// other every L cycles. After an accept, L cycles run slices 0..L-1 (en=1,
// `first` on slice 0, `last` on slice L-1). `fin` is high in the cycle after
// the last slice, when the accumulators hold the final sum and carry words.
// If no sample is offered at the end of a sample, the filter goes idle and
// everything waits.
// Timing: in_ready is combinational from state only; all outputs other than
// accept depend on state only.
// Running L slice cycles per sample follows the design; the valid/ready
// handshake is this implementation's choice.
module da_lms_controller #(
  parameter int L  = 8,
  parameter int SW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          accept,
  output logic [SW-1:0] slice,
  output logic          en,
  output logic          first,
  output logic          last,
  output logic          fin
);

  logic running;

  always_comb begin
    en       = running;
    first    = running && (slice == '0);
    last     = running && (32'(slice) == L - 1);
    in_ready = !running || last;
    accept   = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      slice   <= '0;
      fin     <= 1'b0;
    end else begin
      fin <= last;
      if (accept) begin
        running <= 1'b1;
        slice   <= '0;
      end else if (last) begin
        running <= 1'b0;
      end else if (running) begin
        slice <= slice + 1'b1;
      end
    end
  end

endmodule
