// tb_barrel_shifter: exhaustive self-checking test of the arithmetic right
// shift for all 8-bit inputs and all 5-bit shift amounts.
module tb_barrel_shifter;
  localparam int W = 8, SW = 5;
  logic signed [W-1:0] din, dout;
  logic [SW-1:0] shamt;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(W), .SW(SW)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, v;
    for (int x = 0; x < (1 << W); x++) begin
      for (int s = 0; s < (1 << SW); s++) begin
        din = W'(x);
        shamt = SW'(s);
        #1;
        v = int'($signed(W'(x)));
        want = v;
        for (int i = 0; i < s; i++) want = (want < 0) ? -((-want + 1) / 2) : want / 2;
        checks++;
        if (int'(dout) != want) begin
          failures++;
          if (failures < 5) $display("%0d >>> %0d = %0d want %0d", v, s, dout, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
