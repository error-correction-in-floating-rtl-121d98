// error_corrector: subtracts the decoded group errors from the main adder's
// result.
//
// Group g's error has weight base^(4g) and up to 6 digits, so it spans digits
// 4g .. 4g+5. The errors of even groups do not overlap one another, nor do those
// of odd groups; they are laid into two digit vectors A and B of 4G+2 digits.
// The full result of the main adder (its 4G digits with its final transfer digit
// as digit 4G) is extended to 4G+2 digits, and two chained redundant
// subtracters form result - A - B. The corrected value equals
// OTD*base^(4G) + result of a fault-free main adder; it is given as a
// (4G+2)-digit redundant number whose top digit is always 0.
//
// Interface: res (4G digits), res_otd, err (G groups of 6 digits), radix;
// corrected (4G+2 digits). Purely combinational.
//
// From the thesis: the group errors are weighted, added, and subtracted from
// the erroneous result by a redundant adder. This design's own: separate
// subtracters instead of a second pass through the main adder, and the even/odd
// packing of the errors.
module error_corrector
  import rd_pkg::*;
#(
  parameter int G = 5
) (
  input  logic [4*G-1:0][3:0]   res,
  input  td_t                   res_otd,
  input  logic [G-1:0][5:0][3:0] err,
  input  logic                  radix,
  output logic [4*G+1:0][3:0]   corrected
);

  localparam int W = 4 * G + 2;

  logic [W-1:0][3:0] full, vec_a, vec_b, c1;
  always_comb begin
    full  = '0;
    full[4*G-1:0] = res;
    full[4*G]     = td_digit(res_otd);
    vec_a = '0;
    vec_b = '0;
    for (int g = 0; g < G; g++) begin
      for (int d = 0; d < 6; d++) begin
        if (4 * g + d < W) begin
          if (g % 2 == 0) vec_a[4*g+d] = err[g][d];
          else            vec_b[4*g+d] = err[g][d];
        end
      end
    end
  end

  td_t         unused_otd1, unused_otd2;
  td_t [W-1:0] unused_t1, unused_t2;

  rd_adder #(.N(W)) u_sub_a (.a(full), .b(vec_a), .sub(1'b1), .radix(radix),
                             .itd(2'b00), .s(c1), .otd(unused_otd1), .td_out(unused_t1));
  rd_adder #(.N(W)) u_sub_b (.a(c1), .b(vec_b), .sub(1'b1), .radix(radix),
                             .itd(2'b00), .s(corrected), .otd(unused_otd2),
                             .td_out(unused_t2));

endmodule
