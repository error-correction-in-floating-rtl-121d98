// tb_error_corrector: random check of the result correction for 5 groups
// (20 digits). The result digits, its final transfer digit and the five group
// errors (random values in the 4-digit error range, random representations in
// 6 digits) are random; the corrected value must equal
// result + OTD*base^20 - sum(err_g * base^(4g)), digits in [-6, 6].
module tb_error_corrector;
  import tb_util_pkg::*;
  localparam int G = 5;

  logic [4*G-1:0][3:0]    res;
  logic [1:0]             res_otd;
  logic [G-1:0][5:0][3:0] err;
  logic                   radix;
  logic [4*G+1:0][3:0]    corrected;
  int checks = 0, failures = 0;

  error_corrector dut (.res(res), .res_otd(res_otd), .err(err), .radix(radix), .corrected(corrected));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int to, lim, ev;
    big_t expv;
    for (int n = 0; n < 20000; n++) begin
      radix = 1'($urandom_range(1));
      lim = radix ? 13332 : 7020;
      res = (4*G*4)'(rand_vec(4 * G));
      to = $urandom_range(2) - 1; res_otd = td_enc(to);
      expv = val(96'(res), 4 * G, radix) + big_t'(to) * pow(radix, 4 * G);
      for (int g = 0; g < G; g++) begin
        ev = ($urandom_range(2) == 0) ? 0 : $urandom_range(2 * lim) - lim;
        err[g] = 24'(repr(ev, 6, radix));
        expv = expv - big_t'(ev) * pow(radix, 4 * g);
      end
      #1;
      checks++;
      if (val(96'(corrected), 4 * G + 2, radix) != expv || !in_set(96'(corrected), 4 * G + 2)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d radix=%0d", n, radix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
