// tb_syngen_m999: random check of the mod 999/511 syndrome generator. The group
// result, its transfer digits and the residue-adder output Z (any value in
// [-(m-1), 2(m-1)]) are random; the expected syndrome is
// (result + OTD*base^4 - ITD - Z) mod m, a 4-digit number in [0, m-1].
// Also the thesis's worked example (5324 + 4521 + 1 with an error of -11).
module tb_syngen_m999;
  import tb_util_pkg::*;

  logic [3:0][3:0] z, s;
  logic [3:0][3:0] res;
  logic [1:0]      itd, otd;
  logic            radix;
  int checks = 0, failures = 0;

  syngen_m999 dut (.z(z), .res(res), .itd(itd), .otd(otd), .radix(radix), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, zv, ti, to;
    big_t e;
    for (int n = 0; n < 50000; n++) begin
      radix = 1'($urandom_range(1));
      m  = radix ? 999 : 511;
      zv = $urandom_range(3 * (m - 1)) - (m - 1);
      ti = $urandom_range(2) - 1; to = $urandom_range(2) - 1;
      z = 16'(repr(zv, 4, radix)); res = 16'(rand_vec(4));
      itd = td_enc(ti); otd = td_enc(to);
      #1;
      e = big_t'(pmod(val(96'(res), 4, radix) + to * pow(radix, 4) - ti - zv, m));
      checks++;
      if (val(96'(s), 4, radix) != e || !in_set(96'(s), 4)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d radix=%0d", n, radix);
      end
    end
    // example: 5324 + 4521 + ITD 1 -> (0,-2,4,6) with OTD 1; faulty result
    // (0,-2,4,-5); Z = 329 + 525 = 854 -> syndrome -11 mod 999 = 988
    radix = 1; itd = 2'b10; otd = 2'b10;
    res = {4'sd0, -4'sd2, 4'sd4, -4'sd5};
    z = 16'(repr(854, 4, 1));
    #1;
    checks++;
    if (val(96'(s), 4, 1) != 988) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
