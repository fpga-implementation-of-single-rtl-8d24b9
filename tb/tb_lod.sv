// tb_lod: checks the leading zero count for every leading-one position with
// random lower bits, for a zero input and with lod_sel low (count 0).
module tb_lod;
  logic [26:0] fss;
  logic        lod_sel;
  logic [4:0]  d;
  int checks = 0, failures = 0;

  lod dut (.fss(fss), .lod_sel(lod_sel), .d(d));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [26:0] v, logic sel, int want);
    fss = v; lod_sel = sel; #1;
    checks++;
    if (d !== 5'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL fss=%h sel=%0d d=%0d want %0d", v, sel, d, want);
    end
  endtask

  initial begin
    check('0, 1'b1, 0);
    for (int p = 0; p < 27; p++) begin
      for (int i = 0; i < 50; i++) begin
        logic [26:0] v;
        v = 27'($urandom) & ((27'(1) << p) - 1'b1);
        v[p] = 1'b1;
        check(v, 1'b1, 26 - p);
        check(v, 1'b0, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
