// syngen_m101: syndrome of one 4-digit result group modulo 101 (decimal) or 65
// (octal).
//
// The syndrome is (result - Z) mod m, where Z is the residue adder's output. The
// 4-digit main adder group really computes X +/- Y + ITD = OTD*base^4 + result,
// and base^4 = 1 (mod m), so the error is
//     error = result + OTD - ITD - Z (mod m).
// One 4-digit redundant subtracter forms result - Z with the group's OTD as its
// input transfer digit. Its own output transfer digit (weight base^4, i.e. 1) and
// the group's ITD are then handed to the mod 101/65 residue generator as otd_in
// and itd_in. With a fault-free group the syndrome is 0; otherwise it is the
// error modulo m.
//
// Interface: z (3 digits) from the residue adder, res (4 digits) and itd/otd of
// the main adder group, radix; s (3 digits, value in [0, m-1]).
// Purely combinational.
//
// From the thesis: the structure (subtracter with the OTD as transfer input,
// followed by the residue generator taking the subtracter's OTD and the ITD).
module syngen_m101
  import rd_pkg::*;
(
  input  logic [2:0][3:0] z,
  input  logic [3:0][3:0] res,
  input  td_t             itd,
  input  td_t             otd,
  input  logic            radix,
  output logic [2:0][3:0] s
);

  logic [3:0][3:0] sp;
  td_t             otd_sub;
  td_t [3:0]       unused_td;

  rd_adder #(.N(4)) u_sub (.a(res), .b({4'd0, z}), .sub(1'b1), .radix(radix),
                           .itd(otd), .s(sp), .otd(otd_sub), .td_out(unused_td));

  resgen_m101 u_res (.x(sp), .itd_in(itd), .otd_in(otd_sub), .otd2_in(2'b00),
                     .radix(radix), .r(s));

endmodule
