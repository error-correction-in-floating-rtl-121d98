// rd_adder: N-digit signed-digit redundant adder/subtracter (octal or decimal).
//
// An array of mixed_adder_cell instances. Cell i takes the output transfer digit
// of cell i-1 as its input transfer digit; cell 0 takes itd. Because a transfer
// digit depends only on its own cell's operands, the delay does not grow with N.
// The value computed is exactly
//     a (+/-) b + itd = otd * base^N + s
// with every digit of s in [-6, 6].
//
// Interface: a, b, s are N-digit numbers (digit 0 least significant); sub selects
// a - b; radix selects decimal (1) or octal (0); td_out gives every cell's output
// transfer digit (td_out[N-1] equals otd), which the checker needs at 4-digit
// group boundaries. Purely combinational.
//
// The structure (an array of the mixed cells) follows the thesis. The default
// N = 20 is the significand width of the mixed format (two integer digits and
// eighteen fraction digits).
module rd_adder
  import rd_pkg::*;
#(
  parameter int N = 20
) (
  input  logic [N-1:0][3:0] a,
  input  logic [N-1:0][3:0] b,
  input  logic              sub,
  input  logic              radix,
  input  td_t               itd,
  output logic [N-1:0][3:0] s,
  output td_t               otd,
  output td_t [N-1:0]       td_out
);

  for (genvar i = 0; i < N; i++) begin : g_cell
    td_t    t_in, t_out;
    digit_t sd;
    if (i == 0) begin : g_first
      assign t_in = itd;
    end else begin : g_next
      assign t_in = g_cell[i-1].t_out;
    end
    mixed_adder_cell u_cell (
      .a     (digit_t'(a[i])),
      .b     (digit_t'(b[i])),
      .sub   (sub),
      .radix (radix),
      .itd   (t_in),
      .otd   (t_out),
      .s     (sd)
    );
    assign s[i]      = sd;
    assign td_out[i] = t_out;
  end

  assign otd = td_out[N-1];

endmodule
