// tb_man_sum: checks path selection and round to nearest even. For random
// 27-bit significands (and all eight guard/round/sticky patterns on an
// all-ones significand) the expected result is found by comparing the three
// dropped bits with one half: above rounds up, below truncates, exactly half
// rounds to the even neighbour.
module tb_man_sum;
  logic [26:0] man_far, man_near;
  logic        lod_sel;
  logic [22:0] frac;
  logic        hidden, rnd_carry, inexact;
  int checks = 0, failures = 0;
  int n_carry = 0, n_tie = 0;

  man_sum dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [26:0] mf, logic [26:0] mn, logic sel);
    logic [26:0] m;
    int unsigned keep, rem, want;
    man_far = mf; man_near = mn; lod_sel = sel; #1;
    m = sel ? mn : mf;
    keep = int'(m) / 8; rem = int'(m) % 8;
    want = keep + ((rem > 4 || (rem == 4 && keep % 2 == 1)) ? 1 : 0);
    if (want >= (1 << 24)) n_carry++;
    if (rem == 4) n_tie++;
    checks++;
    if ({rnd_carry, hidden, frac} !== {want >= (1 << 24), want >= (1 << 23), 23'(want)} ||
        inexact !== (rem != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL m=%h -> %0d %0d %h", m, rnd_carry, hidden, frac);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      check({24'hFF_FFFF, 3'(k)}, 27'($urandom), 1'b0);
      check(27'($urandom), {24'hFF_FFFE, 3'(k)}, 1'b1);
    end
    for (int i = 0; i < 5000; i++) check(27'($urandom), 27'($urandom), 1'($urandom));
    checks++;
    if (n_carry == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
