// tb_resgen_m101: exhaustive check of the mod 101/65 residue generator over all
// 28561 four-digit inputs and both radices, cycling through the 27 combinations
// of itd_in, otd_in and otd2_in. Expected: R = (X + otd_in + otd2_in - itd_in)
// mod m as a 3-digit number in [0, m-1] with digits in [-6, 6].
module tb_resgen_m101;
  import tb_util_pkg::*;

  logic [3:0][3:0] x;
  logic [1:0]      itd_in, otd_in, otd2_in;
  logic            radix;
  logic [2:0][3:0] r;
  int checks = 0, failures = 0;

  resgen_m101 dut (.x(x), .itd_in(itd_in), .otd_in(otd_in), .otd2_in(otd2_in), .radix(radix), .r(r));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, combo, ti, to, to2;
    big_t rv;
    combo = 0;
    for (int rd = 0; rd < 2; rd++)
      for (int d3 = -6; d3 <= 6; d3++)
        for (int d2 = -6; d2 <= 6; d2++)
          for (int d1 = -6; d1 <= 6; d1++)
            for (int d0 = -6; d0 <= 6; d0++) begin
              radix = rd[0];
              m = radix ? 101 : 65;
              x = {4'(d3), 4'(d2), 4'(d1), 4'(d0)};
              ti = combo % 3 - 1; to = (combo / 3) % 3 - 1; to2 = (combo / 9) % 3 - 1;
              combo = (combo + 1) % 27;
              itd_in = td_enc(ti); otd_in = td_enc(to); otd2_in = td_enc(to2);
              #1;
              rv = val(96'(r), 3, radix);
              checks++;
              if (rv != big_t'(pmod(val(96'(x), 4, radix) + to + to2 - ti, m)) || !in_set(96'(r), 3)) begin
                failures++;
                if (failures < 10) $display("FAIL x=%0d %0d %0d %0d radix=%0d itd=%0d otd=%0d otd2=%0d r=%0d",
                                            d3, d2, d1, d0, rd, ti, to, to2, rv);
              end
            end
    // worked example: 4 5 6 5 with the top two digits negative (-4,-5,6,5) mod 101 = 9 (1, -1)
    radix = 1; x = {-4'sd4, -4'sd5, 4'sd6, 4'sd5}; itd_in = 0; otd_in = 0; otd2_in = 0; #1;
    checks++;
    if (val(96'(r), 3, 1) != 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
