// result_decoder: the second way of obtaining a correct result - decoding the
// residues of the sum itself instead of the error.
//
// For every 4-digit group g the first stage delivers Z101 = Xg +/- Yg and
// Z999 = Xg +/- Yg as unreduced residue sums. Reduced to [0, m-1] by the two
// residue generators (all correction inputs zero) they form the residue pair of
// the group value Vg = Xg +/- Yg. Vg lies in the same range as a group error
// (+/-13332 decimal, +/-7020 octal: two 4-digit numbers of digits in [-6, 6]),
// so the syndrome decoder turns the pair into Vg itself. The result is then
// sum over g of Vg * base^(4g) + ITD: the decoded values of the even groups and
// those of the odd groups do not overlap (each spans digits 4g .. 4g+5), so
// they are laid into two digit vectors and added by one (4G+2)-digit redundant
// adder whose transfer input is the operation's ITD. Group transfer digits
// inside the main adder play no part, so a fault in the main adder cannot reach
// this output; only a fault in the checker itself can.
//
// Interface: z101 (G groups of 3 digits) and z999 (G groups of 4 digits) from
// the first stage, itd into digit 0, radix; result (4G+2 digits) with the value
// X +/- Y + ITD. Purely combinational.
//
// From the thesis: feeding the decoder with the modular adders' outputs
// (including the residue calculation) instead of the syndromes, and the fact that
// the result range is covered by the error range. This design's own: a separate
// decoder per group rather than a multiplexer in front of the syndrome decoder,
// and the even/odd packing with one final adder.
module result_decoder
  import rd_pkg::*;
#(
  parameter int G = 5
) (
  input  logic [G-1:0][2:0][3:0] z101,
  input  logic [G-1:0][3:0][3:0] z999,
  input  td_t                    itd,
  input  logic                   radix,
  output logic [4*G+1:0][3:0]    result
);

  localparam int W = 4 * G + 2;

  logic [G-1:0][5:0][3:0] vg;

  for (genvar g = 0; g < G; g++) begin : g_dec
    logic [2:0][3:0] r101;
    logic [3:0][3:0] r999;
    resgen_m101 u_r101 (.x({4'b0000, z101[g]}), .itd_in(2'b00), .otd_in(2'b00),
                        .otd2_in(2'b00), .radix(radix), .r(r101));
    resgen_m999 u_r999 (.x(z999[g]), .itd_in(2'b00), .otd_in(2'b00),
                        .otd2_in(2'b00), .radix(radix), .r(r999));
    syndrome_decoder u_dec (.s999(r999), .s101(r101), .radix(radix), .err(vg[g]));
  end

  logic [W-1:0][3:0] vec_a, vec_b;
  always_comb begin
    vec_a = '0;
    vec_b = '0;
    for (int g = 0; g < G; g++) begin
      for (int d = 0; d < 6; d++) begin
        if (4 * g + d < W) begin
          if (g % 2 == 0) vec_a[4*g+d] = vg[g][d];
          else            vec_b[4*g+d] = vg[g][d];
        end
      end
    end
  end

  td_t         unused_otd;
  td_t [W-1:0] unused_td;

  rd_adder #(.N(W)) u_add (.a(vec_a), .b(vec_b), .sub(1'b0), .radix(radix), .itd(itd),
                           .s(result), .otd(unused_otd), .td_out(unused_td));

endmodule
