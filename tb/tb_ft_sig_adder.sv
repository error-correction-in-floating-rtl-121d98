// tb_ft_sig_adder: end-to-end test of the fault-tolerant significand adder at its
// default size (5 groups, 20 digits). Each operation takes random 20-digit
// redundant operands, a random operation, radix and input transfer digit, and a
// random fault pattern that overwrites result digits of the main adder (none,
// one group, or several groups). Checked for every operation:
//   - the raw sum equals the integer reference model when no digit is faulty;
//   - stall[g] is set exactly for the groups whose result value is wrong;
//   - the corrected result's value equals X +/- Y + ITD, and so does the
//     result decoded directly from the first-stage residues;
//   - out_valid comes exactly 5 clock edges after the accepting edge.
// Every mechanism must occur at least once: decimal and octal operations,
// addition and subtraction, fault-free operations, stalls, errors in a group
// served by each shared first-stage unit, several faulty groups at once, and
// negative and positive group errors.
module tb_ft_sig_adder;
  import tb_util_pkg::*;
  localparam int G = 5;
  localparam int N = 4 * G;
  localparam int LATENCY = 5;
  localparam int NOPS = 4000;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, sub = 0, radix = 0;
  logic [1:0]        itd = 0, sum_otd;
  logic [N-1:0][3:0] x = '0, y = '0, flt_digit = '0, sum;
  logic [N-1:0]      flt_en = '0;
  logic              sum_valid, err_detected, out_valid;
  logic [G-1:0]      stall;
  logic [N+1:0][3:0] corrected, decoded;
  int checks = 0, failures = 0, cycle = 0;

  ft_sig_adder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                    .x(x), .y(y), .sub(sub), .radix(radix), .itd(itd),
                    .flt_en(flt_en), .flt_digit(flt_digit),
                    .sum_valid(sum_valid), .sum(sum), .sum_otd(sum_otd),
                    .stall(stall), .err_detected(err_detected), .out_valid(out_valid),
                    .corrected(corrected), .decoded(decoded));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NOPS * (LATENCY + 4) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_dec = 0, n_oct = 0, n_add = 0, n_sub = 0, n_clean = 0, n_stall = 0,
      n_unit_a = 0, n_unit_b = 0, n_multi = 0, n_neg = 0, n_pos = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin
    logic [95:0] good, xv, yv, fd;
    logic [N-1:0] fe;
    int ti, to, start, nbad, mode;
    int tds[24];
    logic [G-1:0] exp_stall;
    big_t e, truth;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int op = 0; op < NOPS; op++) begin
      xv = rand_vec(N); yv = rand_vec(N);
      sub = 1'($urandom_range(1)); radix = 1'($urandom_range(1));
      ti = $urandom_range(2) - 1;
      good = ref_add(xv, yv, N, sub, radix, ti, to, tds);
      // fault pattern: 0 none, 1 one group, 2 several groups, 3 any digits
      mode = $urandom_range(3);
      fe = '0; fd = '0;
      if (mode == 1) begin
        int g = $urandom_range(G - 1);
        for (int i = 0; i < 4; i++) if ($urandom_range(1) == 1 || i == 0) fe[4*g+i] = 1'b1;
      end else if (mode >= 2) begin
        for (int i = 0; i < N; i++) fe[i] = ($urandom_range(mode == 2 ? 5 : 2) == 0);
      end
      for (int i = 0; i < N; i++) fd[4*i +: 4] = rand_digit();
      exp_stall = '0; nbad = 0;
      for (int g = 0; g < G; g++) begin
        logic [95:0] gb;
        gb = good;
        for (int i = 4*g; i < 4*g + 4; i++) if (fe[i]) gb[4*i +: 4] = fd[4*i +: 4];
        e = val(gb >> (16*g), 4, radix) - val(good >> (16*g), 4, radix);
        if (e != 0) begin
          exp_stall[g] = 1'b1; nbad++;
          if (e < 0) n_neg++; else n_pos++;
          if (g < (G + 1) / 2) n_unit_a++; else n_unit_b++;
        end
      end
      if (radix) n_dec++; else n_oct++;
      if (sub) n_sub++; else n_add++;
      if (nbad == 0) n_clean++; else n_stall++;
      if (nbad > 1) n_multi++;

      // issue
      x = (N*4)'(xv); y = (N*4)'(yv); itd = td_enc(ti);
      flt_en = fe; flt_digit = (N*4)'(fd);
      in_valid = 1;
      check("in_ready when idle", in_ready);
      @(posedge clk);
      start = cycle;
      in_valid = 0;
      #1;
      check("sum_valid", sum_valid);
      if (fe == '0) check("raw sum", 96'(sum) == good && td_dec(sum_otd) == to);
      while (!out_valid) begin
        @(posedge clk);
        #1;
        if (cycle - start > 20) break;
      end
      check("latency", cycle - start == LATENCY);
      truth = sub ? val(xv, N, radix) - val(yv, N, radix) : val(xv, N, radix) + val(yv, N, radix);
      truth = truth + ti;
      check("stall flags", stall == exp_stall && err_detected == (nbad != 0));
      check("corrected value", val(96'(corrected), N + 2, radix) == truth && in_set(96'(corrected), N + 2));
      check("decoded value", val(96'(decoded), N + 2, radix) == truth && in_set(96'(decoded), N + 2));
      @(posedge clk);
    end
    $display("decimal=%0d octal=%0d add=%0d sub=%0d clean=%0d stalled=%0d unitA_err=%0d unitB_err=%0d multi=%0d neg=%0d pos=%0d",
             n_dec, n_oct, n_add, n_sub, n_clean, n_stall, n_unit_a, n_unit_b, n_multi, n_neg, n_pos);
    check("every mechanism seen", n_dec > 0 && n_oct > 0 && n_add > 0 && n_sub > 0 && n_clean > 0 &&
          n_stall > 0 && n_unit_a > 0 && n_unit_b > 0 && n_multi > 0 && n_neg > 0 && n_pos > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
