// mixed_adder_cell: one digit of the signed-digit mixed octal/decimal adder.
//
// The two operand digits are added (or b is subtracted) in a small binary adder,
// giving the interim sum. The output transfer digit is +1 when the interim sum is
// 6 or more, -1 when it is -6 or less, and 0 otherwise. The sum digit is
// interim - OTD*base + ITD, where base is 10 (radix = 1) or 8 (radix = 0). The
// OTD depends only on this cell's operands, so an array of cells adds numbers of
// any length without carry propagation: every sum digit settles after one cell
// delay plus one transfer hop.
//
// Interface: a, b operand digits (4-bit two's complement), sub selects a - b,
// radix selects the base, itd/otd transfer digits coded {tpos, tneg}.
// Operands are normally in [-6, 6]; the cell also gives a sum digit in [-6, 6]
// whenever |a| + |b| <= 13, which the residue generators use for operands of
// magnitude 7. Purely combinational.
//
// The transfer rule, the digit set and the two-wire transfer code follow the
// thesis; the binary coding of the interim sum is this design's own.
module mixed_adder_cell
  import rd_pkg::*;
(
  input  digit_t a,
  input  digit_t b,
  input  logic   sub,
  input  logic   radix,
  input  td_t    itd,
  output td_t    otd,
  output digit_t s
);

  logic signed [5:0] a_x, b_x, interim, base, corr;

  always_comb begin
    a_x     = {{2{a[3]}}, a};
    b_x     = {{2{b[3]}}, b};
    interim = sub ? (a_x - b_x) : (a_x + b_x);
    base    = radix ? 6'sd10 : 6'sd8;
    otd     = {interim >= 6'sd6, interim <= -6'sd6};
    // correction digit = ITD - OTD*base
    corr    = 6'(signed'({1'b0, itd[1]})) - 6'(signed'({1'b0, itd[0]}));
    if (otd[1])      corr = corr - base;
    else if (otd[0]) corr = corr + base;
    s       = digit_t'(interim + corr);
  end

endmodule
