// tb_syngen_m101: random check of the mod 101/65 syndrome generator. The group
// result, its transfer digits and the residue-adder output Z (any value in
// [-(m-1), 2(m-1)]) are random; the expected syndrome is
// (result + OTD*base^4 - ITD - Z) mod m, a 3-digit number in [0, m-1].
// Also the thesis's worked example (4324 + 4521 with an error of -1).
module tb_syngen_m101;
  import tb_util_pkg::*;

  logic [2:0][3:0] z, s;
  logic [3:0][3:0] res;
  logic [1:0]      itd, otd;
  logic            radix;
  int checks = 0, failures = 0;

  syngen_m101 dut (.z(z), .res(res), .itd(itd), .otd(otd), .radix(radix), .s(s));

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
      m  = radix ? 101 : 65;
      zv = $urandom_range(3 * (m - 1)) - (m - 1);
      ti = $urandom_range(2) - 1; to = $urandom_range(2) - 1;
      z = 12'(repr(zv, 3, radix)); res = 16'(rand_vec(4));
      itd = td_enc(ti); otd = td_enc(to);
      #1;
      e = big_t'(pmod(val(96'(res), 4, radix) + to * pow(radix, 4) - ti - zv, m));
      checks++;
      if (val(96'(s), 3, radix) != e || !in_set(96'(s), 3)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d radix=%0d", n, radix);
      end
    end
    // example: 4324 + 4521, ITD 0 -> (-1,-2,4,5) with OTD 1; faulty result
    // (-1,-2,4,4); Z = 82 + 77 = 159 -> syndrome -1 mod 101 = 100
    radix = 1; itd = 2'b00; otd = 2'b10;
    res = {-4'sd1, -4'sd2, 4'sd4, 4'sd4};
    z = 12'(repr(159, 3, 1));
    #1;
    checks++;
    if (val(96'(s), 3, 1) != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
