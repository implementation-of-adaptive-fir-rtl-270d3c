// tb_sign_mag_separator: exhaustive self-checking test over all 12-bit errors.
module tb_sign_mag_separator;
  localparam int EW = 12;
  logic signed [EW-1:0] e;
  logic sgn;
  logic [EW-1:0] mag;
  int checks = 0, failures = 0;

  sign_mag_separator #(.EW(EW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, a;
    for (v = -(1 << (EW-1)); v < (1 << (EW-1)); v++) begin
      e = EW'(v);
      #1;
      a = (v < 0) ? -v : v;
      checks += 2;
      if (sgn != (v < 0)) failures++;
      if (int'(mag) != a) begin
        failures++;
        if (failures < 5) $display("e=%0d mag=%0d", v, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
