// tb_result_decoder: random check of the direct result decoding for 5 groups
// (20 digits). X and Y are random 20-digit vectors with digits in [-6, 6]; for
// each group the residue sums Z101 and Z999 are worked out from the integer
// values of the operand groups and given in a random redundant representation.
// The decoded result's value must equal X +/- Y + ITD, with every digit in
// [-6, 6]. Group values at the ends of their range are forced now and then.
module tb_result_decoder;
  import tb_util_pkg::*;
  localparam int G = 5;
  localparam int NVEC = 20000;

  logic [G-1:0][2:0][3:0] z101;
  logic [G-1:0][3:0][3:0] z999;
  logic [1:0]             itd;
  logic                   radix;
  logic [4*G+1:0][3:0]    result;
  int checks = 0, failures = 0;

  result_decoder dut (.z101(z101), .z999(z999), .itd(itd), .radix(radix), .result(result));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] xv, yv;
    int ti, ma, mb, sg;
    bit sub;
    big_t vx, vy, expv;
    for (int n = 0; n < NVEC; n++) begin
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      ma = radix ? 101 : 65; mb = radix ? 999 : 511;
      xv = rand_vec(4 * G); yv = rand_vec(4 * G);
      if ($urandom_range(7) == 0) begin
        // extreme group values: X +/- Y = +/-(6666...6 + 6666...6)
        sg = ($urandom_range(1) == 0) ? 6 : -6;
        for (int i = 0; i < 4 * G; i++) begin
          xv[4*i +: 4] = 4'(sg);
          yv[4*i +: 4] = 4'(sub ? -sg : sg);
        end
      end
      ti = $urandom_range(2) - 1; itd = td_enc(ti);
      for (int g = 0; g < G; g++) begin
        vx = val(xv >> (16 * g), 4, radix);
        vy = val(yv >> (16 * g), 4, radix);
        z101[g] = 12'(repr(sub ? pmod(vx, ma) - pmod(vy, ma) : pmod(vx, ma) + pmod(vy, ma), 3, radix));
        z999[g] = 16'(repr(sub ? pmod(vx, mb) - pmod(vy, mb) : pmod(vx, mb) + pmod(vy, mb), 4, radix));
      end
      expv = (sub ? val(xv, 4 * G, radix) - val(yv, 4 * G, radix)
                  : val(xv, 4 * G, radix) + val(yv, 4 * G, radix)) + big_t'(ti);
      #1;
      checks++;
      if (val(96'(result), 4 * G + 2, radix) != expv || !in_set(96'(result), 4 * G + 2)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d radix=%0d sub=%0d exp=%0d got=%0d", n, radix, sub,
                                    expv, val(96'(result), 4 * G + 2, radix));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
