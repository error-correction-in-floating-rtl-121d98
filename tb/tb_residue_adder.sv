// tb_residue_adder: checks both residue adder sizes (3 digits for mod 101/65,
// 4 digits for mod 999/511). Operands are random redundant representations of
// residues in [0, m-1]; the sum must equal xr +/- yr exactly, with digits in
// [-6, 6] and a zero output transfer digit.
module tb_residue_adder;
  import tb_util_pkg::*;

  logic [2:0][3:0] xa, ya, za;
  logic [3:0][3:0] xb, yb, zb;
  logic            sub, radix;
  logic [1:0]      oa, ob;
  int checks = 0, failures = 0;

  residue_adder #(.NDIG(3)) dut_a (.xr(xa), .yr(ya), .sub(sub), .radix(radix), .z(za), .otd(oa));
  residue_adder #(.NDIG(4)) dut_b (.xr(xb), .yr(yb), .sub(sub), .radix(radix), .z(zb), .otd(ob));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ma, mb, vxa, vya, vxb, vyb;
    big_t ea, eb;
    for (int n = 0; n < 20000; n++) begin
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      ma = radix ? 101 : 65; mb = radix ? 999 : 511;
      vxa = $urandom_range(ma - 1); vya = $urandom_range(ma - 1);
      vxb = $urandom_range(mb - 1); vyb = $urandom_range(mb - 1);
      xa = 12'(repr(vxa, 3, radix)); ya = 12'(repr(vya, 3, radix));
      xb = 16'(repr(vxb, 4, radix)); yb = 16'(repr(vyb, 4, radix));
      #1;
      ea = sub ? vxa - vya : vxa + vya;
      eb = sub ? vxb - vyb : vxb + vyb;
      checks++;
      if (val(96'(za), 3, radix) != ea || oa != 2'b00 || !in_set(96'(za), 3)) begin
        failures++;
        if (failures < 10) $display("FAIL A %0d %s %0d radix=%0d", vxa, sub ? "-" : "+", vya, radix);
      end
      checks++;
      if (val(96'(zb), 4, radix) != eb || ob != 2'b00 || !in_set(96'(zb), 4)) begin
        failures++;
        if (failures < 10) $display("FAIL B %0d %s %0d radix=%0d", vxb, sub ? "-" : "+", vyb, radix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
