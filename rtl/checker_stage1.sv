// checker_stage1: first stage of the residue checker for one 4-digit group.
//
// It needs only the operands, so it runs in parallel with the main adder: the
// residues of both operand groups modulo 101/65 and 999/511 (four residue
// generators, transfer-digit inputs tied to zero), then the two residue adders
// that add or subtract them. The outputs are the unreduced residue sums that the
// syndrome generators of the second stage compare with the main adder's result.
//
// Interface: xg, yg (4 digits each), sub, radix; z101 (3 digits), z999 (4 digits).
// Purely combinational.
//
// The split into a first stage (independent of the main adder's result) and a
// second stage follows the thesis; so does the content of this stage.
module checker_stage1
  import rd_pkg::*;
(
  input  logic [3:0][3:0] xg,
  input  logic [3:0][3:0] yg,
  input  logic            sub,
  input  logic            radix,
  output logic [2:0][3:0] z101,
  output logic [3:0][3:0] z999
);

  logic [2:0][3:0] xr_a, yr_a;
  logic [3:0][3:0] xr_b, yr_b;
  td_t             unused_otd_a, unused_otd_b;

  resgen_m101 u_xa (.x(xg), .itd_in(2'b00), .otd_in(2'b00), .otd2_in(2'b00),
                    .radix(radix), .r(xr_a));
  resgen_m101 u_ya (.x(yg), .itd_in(2'b00), .otd_in(2'b00), .otd2_in(2'b00),
                    .radix(radix), .r(yr_a));
  resgen_m999 u_xb (.x(xg), .itd_in(2'b00), .otd_in(2'b00), .otd2_in(2'b00),
                    .radix(radix), .r(xr_b));
  resgen_m999 u_yb (.x(yg), .itd_in(2'b00), .otd_in(2'b00), .otd2_in(2'b00),
                    .radix(radix), .r(yr_b));

  residue_adder #(.NDIG(3)) u_add_a (.xr(xr_a), .yr(yr_a), .sub(sub), .radix(radix),
                                     .z(z101), .otd(unused_otd_a));
  residue_adder #(.NDIG(4)) u_add_b (.xr(xr_b), .yr(yr_b), .sub(sub), .radix(radix),
                                     .z(z999), .otd(unused_otd_b));

endmodule
