// tb_util_pkg: reference arithmetic for the testbenches of the redundant-digit
// checker. Values of digit vectors are computed with 128-bit integers; digit
// vectors are passed as up to 24 digits (96 bits), digit 0 in bits [3:0].
// Nothing here uses the design's modules: the expected values come from plain
// integer arithmetic on the definitions (value = sum of digit * base^i).
package tb_util_pkg;

  typedef logic signed [127:0] big_t;

  function automatic int dig(logic [3:0] d);
    return int'($signed(d));
  endfunction

  function automatic int base_of(bit radix);
    return radix ? 10 : 8;
  endfunction

  // value of an ndig-digit vector
  function automatic big_t val(logic [95:0] v, int ndig, bit radix);
    big_t r;
    r = 0;
    for (int i = ndig - 1; i >= 0; i--) r = r * base_of(radix) + big_t'(dig(v[4*i +: 4]));
    return r;
  endfunction

  function automatic big_t pow(bit radix, int e);
    big_t r;
    r = 1;
    for (int i = 0; i < e; i++) r = r * base_of(radix);
    return r;
  endfunction

  // non-negative remainder
  function automatic int pmod(big_t a, int m);
    big_t r;
    r = a % m;
    if (r < 0) r = r + m;
    return int'(r);
  endfunction

  // all digits of an ndig-digit vector lie in [-6, 6]
  function automatic bit in_set(logic [95:0] v, int ndig);
    for (int i = 0; i < ndig; i++) if (dig(v[4*i +: 4]) > 6 || dig(v[4*i +: 4]) < -6) return 0;
    return 1;
  endfunction

  function automatic logic [3:0] rand_digit();
    return 4'($signed($urandom_range(12)) - 6);
  endfunction

  function automatic logic [95:0] rand_vec(int ndig);
    logic [95:0] v;
    v = '0;
    for (int i = 0; i < ndig; i++) v[4*i +: 4] = rand_digit();
    return v;
  endfunction

  // a random redundant representation of value v in ndig digits (digits in
  // [-6, 6]); falls back to the plain balanced one if the random choice fails
  function automatic logic [95:0] repr(big_t v, int ndig, bit radix);
    logic [95:0] d;
    big_t q;
    int b, r, c;
    b = base_of(radix);
    for (int attempt = 0; attempt < 2; attempt++) begin
      d = '0;
      q = v;
      for (int i = 0; i < ndig; i++) begin
        r = int'(q % b);                      // in (-b, b)
        if (i == ndig - 1) begin
          c = int'(q);
          if (c > 6 || c < -6) break;
          d[4*i +: 4] = 4'(c);
          return d;
        end
        // candidates congruent to q: r, r - b, r + b within [-6, 6]
        c = r;
        if (attempt == 0 && $urandom_range(1) == 1) begin
          if (r - b >= -6) c = r - b;
          else if (r + b <= 6) c = r + b;
        end else begin
          if (c > b / 2) c = c - b;
          else if (c < -(b / 2) + 1) c = c + b;
        end
        if (c > 6 || c < -6) c = (c > 0) ? c - b : c + b;
        d[4*i +: 4] = 4'(c);
        q = (q - c) / b;
      end
    end
    return d;
  endfunction

  // reference model of a redundant adder of ndig digits, from the digit
  // equations: interim = a +/- b, OTD = +1 if interim >= 6, -1 if <= -6,
  // sum = interim - OTD*base + ITD. Returns the sums; otd and per-digit
  // transfer digits by reference.
  function automatic logic [95:0] ref_add(logic [95:0] a, logic [95:0] b, int ndig,
                                          bit sub, bit radix, int itd,
                                          output int otd, output int tds[24]);
    logic [95:0] s;
    int is, t, tin;
    s = '0;
    tin = itd;
    for (int i = 0; i < ndig; i++) begin
      is = sub ? dig(a[4*i +: 4]) - dig(b[4*i +: 4]) : dig(a[4*i +: 4]) + dig(b[4*i +: 4]);
      t = (is >= 6) ? 1 : ((is <= -6) ? -1 : 0);
      s[4*i +: 4] = 4'(is - t * base_of(radix) + tin);
      tds[i] = t;
      tin = t;
    end
    otd = tin;
    return s;
  endfunction

  function automatic logic [1:0] td_enc(int t);
    return (t > 0) ? 2'b10 : ((t < 0) ? 2'b01 : 2'b00);
  endfunction

  function automatic int td_dec(logic [1:0] t);
    return int'(t[1]) - int'(t[0]);
  endfunction

endpackage
