// tb_mixed_adder_cell: exhaustive check of one mixed octal/decimal adder cell.
// For every operand pair in [-7, 7] with |a| + |b| <= 13, both operations, both
// radices and every input transfer digit it checks the transfer rule (+1 at an
// interim sum of 6 or more, -1 at -6 or less), the digit range [-6, 6] and the
// identity s + OTD*base = a +/- b + ITD.
module tb_mixed_adder_cell;
  import tb_util_pkg::*;

  logic [3:0] a, b, s;
  logic       sub, radix;
  logic [1:0] itd, otd;
  int checks = 0, failures = 0;

  mixed_adder_cell dut (.a(a), .b(b), .sub(sub), .radix(radix), .itd(itd), .otd(otd), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int is, t;
    for (int ia = -7; ia <= 7; ia++)
      for (int ib = -7; ib <= 7; ib++)
        for (int k = 0; k < 4; k++)
          for (int it = -1; it <= 1; it++) begin
            if ((ia < 0 ? -ia : ia) + (ib < 0 ? -ib : ib) > 13) continue;
            a = 4'(ia); b = 4'(ib); sub = k[0]; radix = k[1]; itd = td_enc(it);
            #1;
            is = sub ? ia - ib : ia + ib;
            t  = (is >= 6) ? 1 : ((is <= -6) ? -1 : 0);
            checks++;
            if (td_dec(otd) != t || dig(s) > 6 || dig(s) < -6 ||
                dig(s) + td_dec(otd) * base_of(radix) != is + it) begin
              failures++;
              if (failures < 10)
                $display("FAIL a=%0d b=%0d sub=%0d radix=%0d itd=%0d: s=%0d otd=%0d",
                         ia, ib, sub, radix, it, dig(s), td_dec(otd));
            end
          end
    // worked example of the thesis's decimal cell: 5 + 6 -> interim 11,
    // OTD 1, with ITD 1 the digit is 11 - 10 + 1 = 2
    a = 4'd5; b = 4'd6; sub = 0; radix = 1; itd = 2'b10; #1;
    checks++;
    if (dig(s) != 2 || td_dec(otd) != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
