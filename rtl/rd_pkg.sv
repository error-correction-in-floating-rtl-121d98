// rd_pkg: shared types and helpers for the signed-digit (redundant) octal/decimal
// arithmetic used by the main significand adder and by its residue checker.
//
// A digit is a 4-bit two's-complement number. Legal result digits lie in [-6, 6]
// (the redundant digit set of the significand adder); some internal operand digits
// of the residue generators go one step further, to [-7, 7], which the 4-bit code
// still holds. A transfer digit (carry between digit positions) is two wires,
// {tpos, tneg}, with value tpos - tneg. A number of n digits is a packed array
// logic [n-1:0][3:0], digit 0 least significant. The radix signal is 1 for
// decimal (base 10) and 0 for octal (base 8).
package rd_pkg;

  typedef logic signed [3:0] digit_t;
  typedef logic [1:0]        td_t;      // {tpos, tneg}


  // Moduli pairs of the residue code: decimal {999, 101}, octal {511, 65}.
  localparam int M_A_DEC = 101;
  localparam int M_A_OCT = 65;
  localparam int M_B_DEC = 999;
  localparam int M_B_OCT = 511;

  // Value of a transfer digit.
  function automatic int td_val(td_t t);
    return int'(t[1]) - int'(t[0]);
  endfunction

  // Transfer digit with the opposite value.
  function automatic td_t td_neg(td_t t);
    return {t[0], t[1]};
  endfunction

  // Transfer digit as a 4-bit digit.
  function automatic digit_t td_digit(td_t t);
    return digit_t'(t[1] ? 4'sd1 : (t[0] ? -4'sd1 : 4'sd0));
  endfunction

  // Non-redundant recoding of an integer into NDIG digits, each digit in
  // [-(b/2)+1, b/2] (decimal [-4,5], octal [-3,4]); used for constants and
  // look-up table contents.
  function automatic logic [23:0] recode6(int v, logic radix);
    logic [23:0] d;
    int base, r, q;
    base = radix ? 10 : 8;
    q = v;
    d = '0;
    for (int i = 0; i < 6; i++) begin
      r = q % base;                 // sign follows q
      if (r > base / 2)       r = r - base;
      else if (r < -(base / 2) + 1) r = r + base;
      d[4*i +: 4] = 4'(r);
      q = (q - r) / base;
    end
    return d;
  endfunction

endpackage
