// syndrome_decoder: turns the syndrome pair of one 4-digit group into the
// signed error value, by the matrix (MATR) residue-to-weighted conversion with
// m1 = 999/511 and m2 = 101/65:
//     p1 = S999,  t1 = (S101 - p1) mod m2,
//     p2 = m1 * ((m1^-1 mod m2) * t1 mod m2),   E = p1 + p2,
// where m1^-1 mod m2 is 55 (decimal) or 36 (octal). E lies in [0, m1*m2 - 1];
// values above half the range stand for negative errors, so a parallel branch
// adds -m1*m2 (-100899 or -33215) and a range checker picks the branch.
//
// Datapath: a 4-digit redundant subtracter forms S101 - p1; the mod 101/65
// residue generator reduces it (its OTD input takes the subtracter's transfer
// digit) to t1. t1 addresses two p2 look-up tables, one per radix, of 101 and 65
// entries, each a 6-digit number; the tables are filled at elaboration from the
// formula above. The correction generator forms p1 - m1*m2 as a 6-digit number.
// Two 6-digit redundant adders give E_uncorr = p2 + p1 and E_corr = p2 + p1corr;
// the range checker compares the value of E_uncorr with 50449 (decimal) or 16607
// (octal).
//
// Interface: s999 (4 digits), s101 (3 digits), radix; err (6 digits, the error
// with sign). Purely combinational.
//
// From the thesis: the MATR case m1 = 999/511, m2 = 101/65, the constants 55
// and 36, the p2 tables addressed by t1, the parallel negative correction and the
// 50449 limit. This design's own: the tables are addressed by the binary value of
// t1, the correction generator produces a 6-digit p1corr and the error output has
// 6 digits (an octal error of up to +/-7020 can need a sixth digit).
module syndrome_decoder
  import rd_pkg::*;
(
  input  logic [3:0][3:0] s999,
  input  logic [2:0][3:0] s101,
  input  logic            radix,
  output logic [5:0][3:0] err
);

  typedef logic [23:0] lut_t[128];

  function automatic lut_t build_lut(logic dec);
    lut_t t;
    for (int i = 0; i < 128; i++) begin
      if (dec) t[i] = (i < M_A_DEC) ? recode6(M_B_DEC * ((55 * i) % M_A_DEC), 1'b1) : '0;
      else     t[i] = (i < M_A_OCT) ? recode6(M_B_OCT * ((36 * i) % M_A_OCT), 1'b0) : '0;
    end
    return t;
  endfunction

  localparam lut_t LUT_DEC = build_lut(1'b1);
  localparam lut_t LUT_OCT = build_lut(1'b0);
  localparam logic [23:0] NEG_M_DEC = recode6(-(M_A_DEC * M_B_DEC), 1'b1);
  localparam logic [23:0] NEG_M_OCT = recode6(-(M_A_OCT * M_B_OCT), 1'b0);
  localparam int HALF_DEC = (M_A_DEC * M_B_DEC - 1) / 2;   // 50449
  localparam int HALF_OCT = (M_A_OCT * M_B_OCT - 1) / 2;   // 16607

  // t1' = S101 - p1, then t1 = t1' mod m2
  logic [3:0][3:0] t1p;
  td_t             otd_a;
  td_t [3:0]       unused_a;
  logic [2:0][3:0] t1;

  rd_adder #(.N(4)) u_sub (.a({4'd0, s101}), .b(s999), .sub(1'b1), .radix(radix),
                           .itd(2'b00), .s(t1p), .otd(otd_a), .td_out(unused_a));

  resgen_m101 u_t1gen (.x(t1p), .itd_in(2'b00), .otd_in(otd_a), .otd2_in(2'b00),
                    .radix(radix), .r(t1));

  // table address: binary value of t1 (0..100 or 0..64)
  logic [6:0]       t1_idx;
  logic [5:0][3:0]  p2;
  always_comb begin
    int v;
    v = radix ? (int'(digit_t'(t1[2])) * 100 + int'(digit_t'(t1[1])) * 10 + int'(digit_t'(t1[0])))
              : (int'(digit_t'(t1[2])) * 64  + int'(digit_t'(t1[1])) * 8  + int'(digit_t'(t1[0])));
    t1_idx = 7'(v);
    p2     = radix ? LUT_DEC[t1_idx] : LUT_OCT[t1_idx];
  end

  // correction generator: p1corr = p1 - m1*m2
  logic [5:0][3:0] p1_ext, p1corr, neg_m;
  td_t             unused_otd_c;
  td_t [5:0]       unused_c;
  assign p1_ext = {8'd0, s999};
  assign neg_m  = radix ? NEG_M_DEC : NEG_M_OCT;
  rd_adder #(.N(6)) u_corrgen (.a(p1_ext), .b(neg_m), .sub(1'b0), .radix(radix),
                               .itd(2'b00), .s(p1corr), .otd(unused_otd_c),
                               .td_out(unused_c));

  // E_uncorr = p2 + p1 and E_corr = p2 + p1corr
  logic [5:0][3:0] e_u, e_c;
  td_t             otd_u;
  td_t [5:0]       unused_u, unused_cc;
  rd_adder #(.N(6)) u_add_u (.a(p2), .b(p1_ext), .sub(1'b0), .radix(radix),
                             .itd(2'b00), .s(e_u), .otd(otd_u), .td_out(unused_u));
  rd_adder #(.N(6)) u_add_c (.a(p2), .b(p1corr), .sub(1'b0), .radix(radix),
                             .itd(2'b00), .s(e_c), .otd(), .td_out(unused_cc));

  // range checker and final multiplexer
  logic out_of_range;
  always_comb begin
    int v, w;
    v = td_val(otd_u);
    w = radix ? 10 : 8;
    for (int i = 5; i >= 0; i--) v = v * w + int'(digit_t'(e_u[i]));
    out_of_range = v > (radix ? HALF_DEC : HALF_OCT);
    err = out_of_range ? e_c : e_u;
  end

endmodule
