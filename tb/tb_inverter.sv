// tb_inverter: random test of the conditional inverter; with s_eff set the
// output plus the input must be all ones, otherwise they must be equal.
module tb_inverter;
  logic [26:0] din, dout;
  logic        s_eff;
  int checks = 0, failures = 0;

  inverter dut (.din(din), .s_eff(s_eff), .dout(dout));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      din = 27'($urandom); s_eff = 1'(i); #1;
      checks++;
      if (s_eff ? (28'(din) + 28'(dout) !== 28'h7FF_FFFF) : (dout !== din)) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h s_eff=%0d dout=%h", din, s_eff, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
