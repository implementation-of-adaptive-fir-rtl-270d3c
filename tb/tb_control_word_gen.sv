// tb_control_word_gen: exhaustive self-checking test of the control word.
// For every magnitude, t must be clamp(TOFF - floor(log2 mag), 0, TMAX) and
// nz must be set exactly for non-zero magnitudes whose shift is at most TMAX
// (larger shifts fall in the dead zone). Counts both clamps.
module tb_control_word_gen;
  import da_lms_pkg::*;
  localparam int EW = 12, TOFF = 9, TMAX = 7;
  logic [EW-1:0] mag;
  logic [SHW-1:0] t;
  logic nz;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  control_word_gen #(.EW(EW), .TOFF(TOFF), .TMAX(TMAX)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lg, want;
    for (int m = 0; m < (1 << EW); m++) begin
      mag = EW'(m);
      #1;
      checks++;
      if (m == 0) begin
        if (nz) failures++;
      end else begin
        lg = 0;
        while ((m >> (lg + 1)) != 0) lg++;
        want = TOFF - lg;
        if (want < 0) begin want = 0; n_lo++; end
        if (nz != (want <= TMAX)) failures++;
        if (want > TMAX) begin want = TMAX; n_hi++; end
        checks++;
        if (int'(t) != want) begin
          failures++;
          if (failures < 5) $display("mag=%0d t=%0d want %0d", m, t, want);
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
