// resgen_m101: residue of a 4-digit redundant number modulo 101 (decimal) or
// modulo 65 (octal), i.e. modulo base^2 + 1.
//
// Because base^2 = -1 (mod base^2 + 1), X = x3x2x1x0 reduces to x1x0 - x3x2.
// The subtraction is done by two mixed adder cells. The output transfer digit of
// the upper cell (weight base^2, i.e. -1) is fed back, negated, as the input
// transfer digit of the lower cell, so both reduction steps happen in one level
// of cells and the result r1r0 is a two-digit number in [-66, 66] (decimal) or
// [-54, 54] (octal), congruent to X. This is not a loop: a transfer digit depends
// only on its own cell's operands.
//
// A second pair of cells computes the same subtraction with x2 replaced by
// x2 - 1, i.e. the uncorrected value plus one, in parallel. If the uncorrected
// value is negative, the output is 1, rc1, rc0 (= 100 + r + 1 = r + 101 in the
// given base), otherwise 0, r1, r0. The output R2R1R0 is therefore always in
// [0, m-1].
//
// Extra corrections used by the syndrome generators and the decoder: the result
// is (X + otd_in + otd2_in - itd_in) mod m. The number preparation step adds
// these to x0 and, if the new digit leaves [-4, 4], moves one unit of base into
// x1 (x1 may then reach +/-7, which the cells still handle).
//
// Interface: x (4 digits), itd_in, otd_in, otd2_in transfer digits, radix;
// r (3 digits) the residue. Purely combinational.
//
// From the thesis: the folding of the upper transfer digit into the lower
// cell, the parallel corrected branch built by subtracting one from x2, and the
// third digit from the sign. This design's own: the second OTD input and the
// exact recoding rule of the number preparation step.
module resgen_m101
  import rd_pkg::*;
(
  input  logic [3:0][3:0] x,
  input  td_t             itd_in,
  input  td_t             otd_in,
  input  td_t             otd2_in,
  input  logic            radix,
  output logic [2:0][3:0] r
);

  digit_t            x0p, x1p, x2m1;
  logic signed [5:0] y, base;

  // number preparation
  always_comb begin
    base = radix ? 6'sd10 : 6'sd8;
    y    = 6'(signed'(digit_t'(x[0]))) + 6'(td_val(otd_in)) + 6'(td_val(otd2_in))
         - 6'(td_val(itd_in));
    x1p  = digit_t'(x[1]);
    if (y > 6'sd4) begin
      x0p = digit_t'(y - base);
      x1p = digit_t'(x[1]) + 4'sd1;
    end else if (y < -6'sd4) begin
      x0p = digit_t'(y + base);
      x1p = digit_t'(x[1]) - 4'sd1;
    end else begin
      x0p = digit_t'(y);
    end
    x2m1 = digit_t'(x[2]) - 4'sd1;
  end

  // uncorrected branch: x1'x0' - x3x2, upper OTD folded into the lower ITD
  td_t    u_t0, u_t1;
  digit_t u_r0, u_r1;
  mixed_adder_cell u_c0 (.a(x0p), .b(digit_t'(x[2])), .sub(1'b1), .radix(radix),
                         .itd(td_neg(u_t1)), .otd(u_t0), .s(u_r0));
  mixed_adder_cell u_c1 (.a(x1p), .b(digit_t'(x[3])), .sub(1'b1), .radix(radix),
                         .itd(u_t0), .otd(u_t1), .s(u_r1));

  // corrected branch: x1'x0' - x3(x2-1)
  td_t    c_t0, c_t1;
  digit_t c_r0, c_r1;
  mixed_adder_cell c_c0 (.a(x0p), .b(x2m1), .sub(1'b1), .radix(radix),
                         .itd(td_neg(c_t1)), .otd(c_t0), .s(c_r0));
  mixed_adder_cell c_c1 (.a(x1p), .b(digit_t'(x[3])), .sub(1'b1), .radix(radix),
                         .itd(c_t0), .otd(c_t1), .s(c_r1));

  // sign checker, third digit generator and final multiplexer
  logic neg;
  always_comb begin
    neg = (u_r1 < 0) || ((u_r1 == 0) && (u_r0 < 0));
    r   = neg ? {4'sd1, c_r1, c_r0} : {4'sd0, u_r1, u_r0};
  end

endmodule
