// residue_adder: modular adder of the checker's first stage.
//
// Adds or subtracts the residues of the two operand groups, Z = Xr +/- Yr, with
// an NDIG-digit redundant adder: NDIG = 3 for the mod 101/65 residues and
// NDIG = 4 for the mod 999/511 residues. The result is not reduced here: its
// reduction is merged into the syndrome generator, which has to reduce anyway.
// Residues in [0, m-1] have a top digit of 0 or 1, so the sum always fits in
// NDIG digits and the output transfer digit is 0; it is still brought out.
//
// Interface: xr, yr, z NDIG-digit numbers; sub = 1 for subtraction; radix.
// Purely combinational.
//
// From the thesis: the structure (one redundant adder, reduction postponed).
module residue_adder
  import rd_pkg::*;
#(
  parameter int NDIG = 3
) (
  input  logic [NDIG-1:0][3:0] xr,
  input  logic [NDIG-1:0][3:0] yr,
  input  logic                 sub,
  input  logic                 radix,
  output logic [NDIG-1:0][3:0] z,
  output td_t                  otd
);

  td_t [NDIG-1:0] unused_td;

  rd_adder #(.N(NDIG)) u_add (.a(xr), .b(yr), .sub(sub), .radix(radix),
                              .itd(2'b00), .s(z), .otd(otd), .td_out(unused_td));

endmodule
