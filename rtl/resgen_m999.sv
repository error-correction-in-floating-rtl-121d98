// resgen_m999: residue of a 4-digit redundant number modulo 999 (decimal) or
// modulo 511 (octal), i.e. modulo base^3 - 1.
//
// Because base^3 = 1 (mod base^3 - 1), X = x3x2x1x0 reduces to the sum of its
// three low digits LS = x2x1x0 and its top digit MS = x3. One 3-digit redundant
// adder computes LS + MS in a single level of cells; its output transfer digit
// OTD2 becomes the fourth digit, so the uncorrected value lies well inside
// (-999, 999) and one range correction is enough. A second adder computes the
// corrected value LS + MS + 999 in parallel: x0 is replaced by x0 - 1 and the
// fourth digit by OTD2 + 1 (999 = 1000 - 1). A sign checker on the uncorrected
// value picks the branch, so the output R3R2R1R0 lies in [0, m-1].
//
// Extra corrections used by the syndrome generator: the result is
// (X + (otd_in + otd2_in) * base - itd_in) mod m. The two OTD inputs form the
// middle digit of MS (MS = 0, otd_in + otd2_in, x3), and -itd_in is the input
// transfer digit of both adders.
//
// Interface: x (4 digits), itd_in, otd_in, otd2_in transfer digits, radix;
// r (4 digits) the residue. Purely combinational.
//
// From the thesis: the single adder stage, the OTD digit inside MS, -ITD as
// the adder's transfer input, the parallel corrected branch with x0 - 1 and the
// fourth digit OTD2 or OTD2 + 1. This design's own: a second OTD input for the
// transfer digit of the subtraction in the syndrome generator.
module resgen_m999
  import rd_pkg::*;
(
  input  logic [3:0][3:0] x,
  input  td_t             itd_in,
  input  td_t             otd_in,
  input  td_t             otd2_in,
  input  logic            radix,
  output logic [3:0][3:0] r
);

  logic [2:0][3:0] ls_u, ls_c, ms;
  digit_t          x_otd;

  // number preparation
  always_comb begin
    x_otd = td_digit(otd_in) + td_digit(otd2_in);
    ms    = {4'sd0, x_otd, digit_t'(x[3])};
    ls_u  = {x[2], x[1], x[0]};
    ls_c  = {x[2], x[1], digit_t'(digit_t'(x[0]) - 4'sd1)};
  end

  logic [2:0][3:0] r_u, r_c;
  td_t             otd_u, otd_c;
  td_t [2:0]       unused_u, unused_c;

  rd_adder #(.N(3)) u_add_u (.a(ls_u), .b(ms), .sub(1'b0), .radix(radix),
                             .itd(td_neg(itd_in)), .s(r_u), .otd(otd_u),
                             .td_out(unused_u));
  rd_adder #(.N(3)) u_add_c (.a(ls_c), .b(ms), .sub(1'b0), .radix(radix),
                             .itd(td_neg(itd_in)), .s(r_c), .otd(otd_c),
                             .td_out(unused_c));

  // sign checker, fourth digit generator and final multiplexer
  logic   neg;
  digit_t d3;
  always_comb begin
    if (otd_u != 2'b00)            neg = otd_u[0];
    else if (r_u[2] != 4'd0)       neg = r_u[2][3];
    else if (r_u[1] != 4'd0)       neg = r_u[1][3];
    else                           neg = r_u[0][3];
    d3 = neg ? td_digit(otd_c) + 4'sd1 : td_digit(otd_u);
    r  = neg ? {d3, r_c} : {d3, r_u};
  end

endmodule
