// tb_syndrome_decoder: exhaustive check of the syndrome decoder over the whole
// 4-digit error range, [-13332, 13332] for decimal and [-7020, 7020] for octal.
// Each error's syndromes (e mod 999/511, e mod 101/65) are given in a random
// redundant representation; the decoded error must equal e. Also the
// thesis's worked example (syndromes 582 mod 999 and 88 mod 101) is
// covered by the sweep (error -417).
module tb_syndrome_decoder;
  import tb_util_pkg::*;

  logic [3:0][3:0] s999;
  logic [2:0][3:0] s101;
  logic            radix;
  logic [5:0][3:0] err;
  int checks = 0, failures = 0;

  syndrome_decoder dut (.s999(s999), .s101(s101), .radix(radix), .err(err));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim;
    for (int rd = 0; rd < 2; rd++) begin
      radix = rd[0];
      lim = radix ? 13332 : 7020;
      for (int e = -lim; e <= lim; e++) begin
        s999 = 16'(repr(pmod(e, radix ? 999 : 511), 4, radix));
        s101 = 12'(repr(pmod(e, radix ? 101 : 65), 3, radix));
        #1;
        checks++;
        if (val(96'(err), 6, radix) != big_t'(e) || !in_set(96'(err), 6)) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d radix=%0d got %0d", e, rd, val(96'(err), 6, radix));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
