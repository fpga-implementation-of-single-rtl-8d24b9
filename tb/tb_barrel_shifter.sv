// tb_barrel_shifter: checks the alignment shifter for every shift amount
// with random and single-bit inputs. The expected output, guard, round and
// sticky bits are computed from a 64-bit integer shift: the value is placed
// at the top of a wide word, shifted, and the bits below the guard and round
// positions are ORed.
module tb_barrel_shifter;
  logic [23:0] din, dout;
  logic [4:0]  shift_amt;
  logic        g, r, s;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din(din), .shift_amt(shift_amt), .dout(dout), .g(g), .r(r), .s(s));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] v, int sh);
    logic [63:0] w;
    din = v; shift_amt = 5'(sh); #1;
    w = {v, 40'd0} >> sh;
    checks++;
    if (dout !== w[63:40] || g !== w[39] || r !== w[38] || s !== (w[37:0] != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL din=%h sh=%0d -> %h %b%b%b", v, sh, dout, g, r, s);
    end
  endtask

  initial begin
    for (int sh = 0; sh < 32; sh++) begin
      for (int b = 0; b < 24; b++) check(24'(1) << b, sh);
      for (int i = 0; i < 200; i++) check(24'($urandom), sh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
