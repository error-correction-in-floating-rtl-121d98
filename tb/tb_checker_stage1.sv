// tb_checker_stage1: random check of the first checker stage. For random 4-digit
// operand groups, both operations and both radices, z101 must be congruent to
// X +/- Y modulo 101/65 and z999 modulo 999/511, with values in the ranges the
// second stage expects ([-(m-1), 2(m-1)]) and digits in [-6, 6].
module tb_checker_stage1;
  import tb_util_pkg::*;

  logic [3:0][3:0] xg, yg, z999;
  logic [2:0][3:0] z101;
  logic            sub, radix;
  int checks = 0, failures = 0;

  checker_stage1 dut (.xg(xg), .yg(yg), .sub(sub), .radix(radix), .z101(z101), .z999(z999));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ma, mb;
    big_t v, za, zb;
    for (int n = 0; n < 50000; n++) begin
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      ma = radix ? 101 : 65; mb = radix ? 999 : 511;
      xg = 16'(rand_vec(4)); yg = 16'(rand_vec(4));
      #1;
      v  = sub ? val(96'(xg), 4, radix) - val(96'(yg), 4, radix) : val(96'(xg), 4, radix) + val(96'(yg), 4, radix);
      za = val(96'(z101), 3, radix);
      zb = val(96'(z999), 4, radix);
      checks++;
      if (pmod(za - v, ma) != 0 || za < -(ma - 1) || za > 2 * (ma - 1) || !in_set(96'(z101), 3)) begin
        failures++;
        if (failures < 10) $display("FAIL 101 n=%0d", n);
      end
      checks++;
      if (pmod(zb - v, mb) != 0 || zb < -(mb - 1) || zb > 2 * (mb - 1) || !in_set(96'(z999), 4)) begin
        failures++;
        if (failures < 10) $display("FAIL 999 n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
