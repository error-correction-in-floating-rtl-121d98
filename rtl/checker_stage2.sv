// checker_stage2: second stage of the residue checker for one 4-digit group.
//
// It takes the group's result digits and transfer digits from the main adder and
// the residue sums of the first stage. The two syndrome generators give the
// syndrome pair; any non-zero syndrome digit flags an error (zero has a single
// representation in this digit set, so no value conversion is needed). The
// syndrome decoder turns the pair into the signed error of the group, which is 0
// when the group is correct.
//
// Interface: res (4 digits), itd, otd of the group; z101 (3 digits), z999
// (4 digits); radix. Outputs: s101, s999 syndromes, err_det, err (6 digits).
// Purely combinational.
//
// From the thesis: the stage contents (syndrome generation, then decoding) and
// the detection of an error from the syndrome before decoding finishes. The
// zero test on the syndrome digits is this design's own.
module checker_stage2
  import rd_pkg::*;
(
  input  logic [3:0][3:0] res,
  input  td_t             itd,
  input  td_t             otd,
  input  logic [2:0][3:0] z101,
  input  logic [3:0][3:0] z999,
  input  logic            radix,
  output logic [2:0][3:0] s101,
  output logic [3:0][3:0] s999,
  output logic            err_det,
  output logic [5:0][3:0] err
);

  syngen_m101 u_sa (.z(z101), .res(res), .itd(itd), .otd(otd), .radix(radix), .s(s101));
  syngen_m999 u_sb (.z(z999), .res(res), .itd(itd), .otd(otd), .radix(radix), .s(s999));

  assign err_det = (|s101) || (|s999);

  syndrome_decoder u_dec (.s999(s999), .s101(s101), .radix(radix), .err(err));

endmodule
