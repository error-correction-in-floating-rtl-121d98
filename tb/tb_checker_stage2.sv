// tb_checker_stage2: the 4-digit checker as a whole, driven with random test
// vectors in the way the design was verified: random operand groups X and Y,
// random ITD, operation and radix; the fault-free group result and OTD come
// from an integer model of the redundant adder's digit equations, then any
// subset of the four result digits (possibly none) is replaced by random digits.
// The residue sums are given as random representations of Xr +/- Yr. Checked:
// err_det is set exactly when the result value is wrong, and err equals the
// error (faulty result value - fault-free result value).
// NVEC = 17,006,112 vectors, the size of the random subset the original
// 4-digit checker was verified with; one vector per time unit, and the
// watchdog fires well after the last one.
module tb_checker_stage2;
  import tb_util_pkg::*;

  logic [3:0][3:0] res, s999;
  logic [2:0][3:0] s101, z101;
  logic [3:0][3:0] z999;
  logic [1:0]      itd, otd;
  logic            radix, err_det;
  logic [5:0][3:0] err;
  localparam int NVEC = 17006112;
  int checks = 0, failures = 0;

  checker_stage2 dut (.res(res), .itd(itd), .otd(otd), .z101(z101), .z999(z999), .radix(radix),
                      .s101(s101), .s999(s999), .err_det(err_det), .err(err));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] xg, yg, good, bad;
    int ti, to, ma, mb, nerr;
    int tds[24];
    bit sub;
    big_t vx, vy, e;
    nerr = 0;
    for (int n = 0; n < NVEC; n++) begin
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      ma = radix ? 101 : 65; mb = radix ? 999 : 511;
      xg = rand_vec(4); yg = rand_vec(4); ti = $urandom_range(2) - 1;
      good = ref_add(xg, yg, 4, sub, radix, ti, to, tds);
      bad = good;
      for (int i = 0; i < 4; i++) if ($urandom_range(3) == 0) bad[4*i +: 4] = rand_digit();
      vx = val(xg, 4, radix); vy = val(yg, 4, radix);
      z101 = 12'(repr(sub ? pmod(vx, ma) - pmod(vy, ma) : pmod(vx, ma) + pmod(vy, ma), 3, radix));
      z999 = 16'(repr(sub ? pmod(vx, mb) - pmod(vy, mb) : pmod(vx, mb) + pmod(vy, mb), 4, radix));
      res = 16'(bad); itd = td_enc(ti); otd = td_enc(to);
      #1;
      e = val(bad, 4, radix) - val(good, 4, radix);
      if (e != 0) nerr++;
      checks++;
      if (err_det != (e != 0) || val(96'(err), 6, radix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d radix=%0d e=%0d got %0d det=%0d", n, radix, e,
                                    val(96'(err), 6, radix), err_det);
      end
    end
    $display("faulty vectors: %0d", nerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
