// syngen_m999: syndrome of one 4-digit result group modulo 999 (decimal) or 511
// (octal).
//
// As in syngen_m101, error = result + OTD*base^4 - ITD - Z (mod m), but here
// base^4 = base (mod m), so the group's OTD has weight base. A 4-digit redundant
// subtracter forms result - Z (transfer input 0). Its output transfer digit, also
// of weight base^4 = base, and the group's OTD both enter the mod 999/511
// residue generator as the middle digit of its most significant part; the
// group's ITD enters it negated as the adder's transfer input.
//
// Interface: z (4 digits) from the residue adder, res (4 digits) and itd/otd of
// the main adder group, radix; s (4 digits, value in [0, m-1]).
// Purely combinational.
//
// From the thesis: the OTD placed at digit position 1 of the most significant
// part and -ITD as the reducing adder's transfer input. This design's own: the
// subtracter's OTD is added into the same digit (the thesis only says that a
// second OTD correction may be needed).
module syngen_m999
  import rd_pkg::*;
(
  input  logic [3:0][3:0] z,
  input  logic [3:0][3:0] res,
  input  td_t             itd,
  input  td_t             otd,
  input  logic            radix,
  output logic [3:0][3:0] s
);

  logic [3:0][3:0] sp;
  td_t             otd_sub;
  td_t [3:0]       unused_td;

  rd_adder #(.N(4)) u_sub (.a(res), .b(z), .sub(1'b1), .radix(radix),
                           .itd(2'b00), .s(sp), .otd(otd_sub), .td_out(unused_td));

  resgen_m999 u_res (.x(sp), .itd_in(itd), .otd_in(otd), .otd2_in(otd_sub),
                     .radix(radix), .r(s));

endmodule
