// tb_rd_adder: random check of the 20-digit redundant adder at its default size.
// Operands are random digit vectors in [-6, 6]; the expected sum, output transfer
// digit and per-digit transfer digits come from an integer reference model of the
// digit equations, and the value identity a +/- b + itd = otd*base^N + s is
// checked with 128-bit integers.
module tb_rd_adder;
  import tb_util_pkg::*;
  localparam int N = 20;

  logic [N-1:0][3:0] a, b, s;
  logic              sub, radix;
  logic [1:0]        itd, otd;
  logic [N-1:0][1:0] tdo;
  int checks = 0, failures = 0;

  rd_adder dut (.a(a), .b(b), .sub(sub), .radix(radix), .itd(itd), .s(s), .otd(otd), .td_out(tdo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] es;
    int eo, it;
    int tds[24];
    big_t lhs, rhs;
    bit ok;
    for (int n = 0; n < 20000; n++) begin
      a = (N*4)'(rand_vec(N)); b = (N*4)'(rand_vec(N));
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      it = $urandom_range(2) - 1; itd = td_enc(it);
      #1;
      es  = ref_add(96'(a), 96'(b), N, sub, radix, it, eo, tds);
      lhs = sub ? val(96'(a), N, radix) - val(96'(b), N, radix) : val(96'(a), N, radix) + val(96'(b), N, radix);
      lhs = lhs + it;
      rhs = val(96'(s), N, radix) + big_t'(td_dec(otd)) * pow(radix, N);
      ok  = (96'(s) == es) && (td_dec(otd) == eo) && (lhs == rhs) && in_set(96'(s), N);
      for (int i = 0; i < N; i++) if (td_dec(tdo[i]) != tds[i]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d sub=%0d radix=%0d", n, sub, radix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
