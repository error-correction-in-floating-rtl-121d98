// ft_sig_adder: fault-tolerant significand adder - the signed-digit mixed
// octal/decimal adder of a combined decimal64/binary64 floating-point adder,
// protected by a residue-code checker that detects and corrects any error in
// the result digits of every 4-digit group.
//
// Main adder: a 4G-digit (20-digit) rd_adder, one add/subtract per operation.
// A fault-injection port can overwrite any of its result digits, modelling a
// faulty main adder; everything downstream sees only the (possibly faulty)
// result and the transfer digits at the group boundaries, which are assumed to
// be fault-free.
//
// Checker, per 4-digit group g: the first stage (operand residues modulo 101/65
// and 999/511, residue adders) needs only the operands. Two first-stage units
// are shared by the G groups: unit A takes groups 0 .. NA-1 and unit B groups
// NA .. G-1, one group per clock, through a multiplexer (NA = ceil(G/2): groups
// 1-3 and 4-5 in the thesis's numbering for G = 5). Their outputs are kept
// per group. Then G second stages in parallel compute the syndromes; a non-zero
// syndrome raises the group's stall flag. The decoded group errors go to the
// error corrector, which subtracts them from the result. As a second,
// independent way to the correct result, the result decoder turns the stored
// first-stage residue sums of every group directly into the group values and
// assembles them; both answers are brought out.
//
// Timing (one operation at a time): in_valid and in_ready high at a rising edge
// accept x, y, sub, radix, itd and the fault pattern. From the next cycle the
// raw result is on sum/sum_otd with sum_valid high. NA cycles of first stage
// follow, then one detection cycle that registers stall/err_detected, then one
// correction cycle. out_valid is high for one cycle, NA + 2 clock edges after
// the accepting edge (5 for G = 5), with the corrected and the decoded
// result; stall and err_detected hold their value until the next operation is
// accepted. in_ready is high only when idle. rst_n resets all registers
// asynchronously; it also disables the handshake assertion at the end, which is
// why a linter may see it used both as an asynchronous reset and as a sampled
// signal - that use is for checking only and adds no logic.
//
// From the thesis: the residue checker itself, the 4-digit groups, five groups
// for the 19-digit significand, two shared first-stage units for groups 1-3 and
// 4-5, five parallel second stages, a stall signal per group, and the two ways
// of correcting the result (subtracting the decoded errors, or decoding the
// residues of the sum). This design's own: the clocking (one group per cycle through each shared unit), the
// registers between the stages, the handshake, and the fault-injection port.
module ft_sig_adder
  import rd_pkg::*;
#(
  parameter int G = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // operation
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [4*G-1:0][3:0]   x,
  input  logic [4*G-1:0][3:0]   y,
  input  logic                  sub,
  input  logic                  radix,
  input  td_t                   itd,
  // fault injection into the main adder's result digits
  input  logic [4*G-1:0]        flt_en,
  input  logic [4*G-1:0][3:0]   flt_digit,
  // raw main adder result
  output logic                  sum_valid,
  output logic [4*G-1:0][3:0]   sum,
  output td_t                   sum_otd,
  // checker
  output logic [G-1:0]          stall,
  output logic                  err_detected,
  output logic                  out_valid,
  output logic [4*G+1:0][3:0]   corrected,
  output logic [4*G+1:0][3:0]   decoded
);

  localparam int N  = 4 * G;
  localparam int NA = (G + 1) / 2;
  localparam int NB = G - NA;
  localparam int CW = (NA > 1) ? $clog2(NA) : 1;

  typedef enum logic [1:0] {S_IDLE, S_STAGE1, S_DETECT, S_CORRECT} state_t;
  state_t state;
  logic [CW-1:0] cnt;

  // operand registers
  logic [N-1:0][3:0] x_q, y_q, flt_digit_q;
  logic [N-1:0]      flt_en_q;
  logic              sub_q, radix_q;
  td_t               itd_q;

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; flt_digit_q <= '0; flt_en_q <= '0;
      sub_q <= 1'b0; radix_q <= 1'b0; itd_q <= 2'b00;
    end else if (in_valid && in_ready) begin
      x_q <= x; y_q <= y; flt_digit_q <= flt_digit; flt_en_q <= flt_en;
      sub_q <= sub; radix_q <= radix; itd_q <= itd;
    end
  end

  // main adder and fault injection
  logic [N-1:0][3:0] main_s;
  td_t               main_otd;
  td_t [N-1:0]       main_td;
  rd_adder #(.N(N)) u_main (.a(x_q), .b(y_q), .sub(sub_q), .radix(radix_q), .itd(itd_q),
                            .s(main_s), .otd(main_otd), .td_out(main_td));

  always_comb begin
    for (int i = 0; i < N; i++) sum[i] = flt_en_q[i] ? flt_digit_q[i] : main_s[i];
  end
  assign sum_otd   = main_otd;
  assign sum_valid = (state != S_IDLE);

  // group transfer digits
  td_t [G-1:0] g_itd, g_otd;
  always_comb begin
    for (int g = 0; g < G; g++) begin
      g_itd[g] = (g == 0) ? itd_q : main_td[4*g-1];
      g_otd[g] = main_td[4*g+3];
    end
  end

  // shared first-stage units
  logic [3:0][3:0] xa, ya, xb, yb;
  logic [2:0][3:0] za101, zb101;
  logic [3:0][3:0] za999, zb999;
  always_comb begin
    xa = x_q[4*int'(cnt) +: 4];
    ya = y_q[4*int'(cnt) +: 4];
    if (NB > 0 && int'(cnt) < NB) begin
      xb = x_q[4*(NA+int'(cnt)) +: 4];
      yb = y_q[4*(NA+int'(cnt)) +: 4];
    end else begin
      xb = '0;
      yb = '0;
    end
  end

  checker_stage1 u_s1a (.xg(xa), .yg(ya), .sub(sub_q), .radix(radix_q), .z101(za101), .z999(za999));
  checker_stage1 u_s1b (.xg(xb), .yg(yb), .sub(sub_q), .radix(radix_q), .z101(zb101), .z999(zb999));

  logic [G-1:0][2:0][3:0] z101_q;
  logic [G-1:0][3:0][3:0] z999_q;

  // second stages
  logic [G-1:0]           det;
  logic [G-1:0][5:0][3:0] gerr;
  for (genvar g = 0; g < G; g++) begin : g_stage2
    checker_stage2 u_s2 (.res(sum[4*g +: 4]), .itd(g_itd[g]), .otd(g_otd[g]),
                         .z101(z101_q[g]), .z999(z999_q[g]), .radix(radix_q),
                         .s101(), .s999(), .err_det(det[g]), .err(gerr[g]));
  end

  logic [G-1:0][5:0][3:0] err_q;
  logic [N+1:0][3:0]      corr_c;
  error_corrector #(.G(G)) u_corr (.res(sum), .res_otd(main_otd), .err(err_q),
                                   .radix(radix_q), .corrected(corr_c));

  // second correction method: decode the first-stage residues into the result
  logic [N+1:0][3:0]      dec_c;
  result_decoder #(.G(G)) u_rdec (.z101(z101_q), .z999(z999_q), .itd(itd_q), .radix(radix_q),
                                  .result(dec_c));

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      z101_q       <= '0;
      z999_q       <= '0;
      err_q        <= '0;
      stall        <= '0;
      err_detected <= 1'b0;
      out_valid    <= 1'b0;
      corrected    <= '0;
      decoded      <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            state        <= S_STAGE1;
            cnt          <= '0;
            stall        <= '0;
            err_detected <= 1'b0;
          end
        end
        S_STAGE1: begin
          z101_q[cnt] <= za101;
          z999_q[cnt] <= za999;
          if (NB > 0 && int'(cnt) < NB) begin
            z101_q[NA+int'(cnt)] <= zb101;
            z999_q[NA+int'(cnt)] <= zb999;
          end
          if (int'(cnt) == NA - 1) state <= S_DETECT;
          else                     cnt   <= cnt + 1'b1;
        end
        S_DETECT: begin
          stall        <= det;
          err_detected <= |det;
          err_q        <= gerr;
          state        <= S_CORRECT;
        end
        S_CORRECT: begin
          corrected <= corr_c;
          decoded   <= dec_c;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a result is delivered only when the unit has returned to idle
  a_out_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid |-> state == S_IDLE);

endmodule
