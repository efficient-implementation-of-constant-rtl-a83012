// tb_cdiv_const -- self-checking testbench of the full-precision constant
// divider.
//
// Several instances cover the published configurations: the exact dividers
// by 3, 5 and 23 for 10-bit dividends (checked exhaustively against integer
// division, and their chosen A/K pairs against the tabulated ones), the
// noise-constrained dividers by 5 with A/K = 103/9 and 51/8 (maximum error,
// mean squared error and SNR over 0..1023 against the tabulated values), the
// dividers by 5 that round or take the ceiling instead of truncating
// (checked exhaustively against round(x/5) and ceil(x/5)), the signed
// divide-by-10 example with 8 fraction bits (A/2^K = 13/128 against
// the plainly truncated reciprocal 25/256), and a rational constant 3/7.
// A clocked watchdog ends the run if it stalls.
`timescale 1ns/1ps
module tb_cdiv_const;
  import cdiv_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Exact dividers of the exact-division table.
  logic [9:0] x10;
  logic [7:0] y5;
  logic [8:0] y3;
  logic [5:0] y23;
  cdiv_const u_d5 (.x(x10), .y(y5));
  cdiv_const #(.D(3))  u_d3  (.x(x10), .y(y3));
  cdiv_const #(.D(23)) u_d23 (.x(x10), .y(y23));

  // Noise-constrained dividers by 5.
  logic [7:0] y_103, y_51;
  cdiv_const #(.D(5), .K(9), .A(103)) u_a103 (.x(x10), .y(y_103));
  cdiv_const #(.D(5), .K(8), .A(51))  u_a51  (.x(x10), .y(y_51));

  // Signed divide-by-10 with 8 fraction bits.
  logic [7:0]  xs;
  logic [12:0] ys_new;   // A = 13, 2^K = 128
  logic [12:0] ys_old;   // A = 25, 2^K = 256 (truncated reciprocal)
  cdiv_const #(.XW(8), .SIGNED(1'b1), .D(10), .K(7), .A(13), .YF(8), .YW(13))
    u_s13 (.x(xs), .y(ys_new));
  cdiv_const #(.XW(8), .SIGNED(1'b1), .D(10), .K(8), .A(25), .YF(8), .YW(13))
    u_s25 (.x(xs), .y(ys_old));

  // Rounding and ceiling as underflow strategies, with the coefficient
  // criterion and K chosen automatically (nearest and lower-nearest A).
  logic [7:0] y_rnd, y_ceil;
  cdiv_const #(.D(5), .RND(RND_ROUND)) u_rnd  (.x(x10), .y(y_rnd));
  cdiv_const #(.D(5), .RND(RND_CEIL))  u_ceil (.x(x10), .y(y_ceil));
  // The same strategies forced onto a too-short coefficient must fail.
  logic [7:0] y_ceil_short;
  cdiv_const #(.D(5), .RND(RND_CEIL), .K(10)) u_ceil_short (.x(x10), .y(y_ceil_short));

  // Rational constant 3/7 on 8-bit dividends.
  logic [7:0] x8;
  logic [8:0] y37;
  cdiv_const #(.XW(8), .NUM(3), .D(7)) u_r37 (.x(x8), .y(y37));

  // Error statistics of a divider by 5 over 0..1023 (y given per x).
  typedef struct {
    int    max_err;
    longint sse;
    real   snr;     // 10*ln(signal power / error power), as tabulated
  } stats_t;

  function automatic stats_t summarize(input longint sig, input longint sse, input int me);
    stats_t s;
    s.max_err = me;
    s.sse     = sse;
    s.snr     = (sse == 0) ? 1.0e9 : 10.0 * $ln(real'(sig) / real'(sse));
    return s;
  endfunction

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    longint sig, sse103, sse51;
    int me103, me51, e, short_wrong = 0;
    real maxe_new, maxe_old, ideal, got;
    stats_t s;

    // Coefficients selected by the elaboration-time search.
    check(u_d3.K == 11 && u_d3.A == 683, "d=3 coefficient 683/2^11");
    check(u_d5.K == 10 && u_d5.A == 205, "d=5 coefficient 205/2^10");
    check(u_d23.K == 14 && u_d23.A == 713, "d=23 coefficient 713/2^14");
    check(exact_limit(1, 3, 683, 11) == 2048, "d=3 range 0..2047");
    check(exact_limit(1, 5, 205, 10) == 1024, "d=5 range 0..1023");
    check(exact_limit(1, 23, 713, 14) == 1092, "d=23 range 0..1091");
    check(coef_a(1, 10, 7, CRIT_NEAREST) == 13, "nearest coefficient for d=10, k=7");
    check(coef_a(1, 10, 8, CRIT_LOWER) == 25, "truncated reciprocal for d=10, k=8");

    $display("round: A=%0d K=%0d  ceil: A=%0d K=%0d  ceil K=10: A=%0d",
             u_rnd.A, u_rnd.K, u_ceil.A, u_ceil.K, u_ceil_short.A);
    check(u_rnd.CRIT == CRIT_NEAREST && u_ceil.CRIT == CRIT_LOWER, "criterion follows rounding");
    check(u_ceil_short.A == 204, "lower-nearest coefficient for k=10");

    sig = 0; sse103 = 0; sse51 = 0; me103 = 0; me51 = 0;
    for (int v = 0; v < 1024; v++) begin
      @(posedge clk);
      x10 = 10'(v);
      x8  = 8'(v);
      #1;
      check(int'(y5) == v / 5, $sformatf("d=5 x=%0d y=%0d", v, y5));
      check(int'(y3) == v / 3, $sformatf("d=3 x=%0d y=%0d", v, y3));
      check(int'(y23) == v / 23, $sformatf("d=23 x=%0d y=%0d", v, y23));
      check(int'(y_rnd) == (2 * v + 5) / 10, $sformatf("round x=%0d y=%0d", v, y_rnd));
      check(int'(y_ceil) == (v + 4) / 5, $sformatf("ceil x=%0d y=%0d", v, y_ceil));
      if (int'(y_ceil_short) != (v + 4) / 5) short_wrong++;
      if (v < 256) check(int'(y37) == (3 * v) / 7, $sformatf("3/7 x=%0d y=%0d", v, y37));
      sig += longint'(v / 5) * longint'(v / 5);
      e = int'(y_103) - v / 5;
      sse103 += longint'(e * e);
      if ((e < 0 ? -e : e) > me103) me103 = (e < 0 ? -e : e);
      e = int'(y_51) - v / 5;
      sse51 += longint'(e * e);
      if ((e < 0 ? -e : e) > me51) me51 = (e < 0 ? -e : e);
    end

    check(short_wrong > 0, "ceiling with a lower 204/2^10 is not exact over 0..1023");

    s = summarize(sig, sse103, me103);
    $display("A=103 k=9 : ME=%0d MSE=%f SNR=%f", s.max_err, real'(s.sse) / 1024.0, s.snr);
    check(s.max_err == 1, "A=103 max error 1");
    check(s.sse == 512, "A=103 MSE 0.5");
    check(near(s.snr, 102.3128, 0.001), "A=103 SNR 102.3128");
    s = summarize(sig, sse51, me51);
    $display("A=51  k=8 : ME=%0d MSE=%f SNR=%f", s.max_err, real'(s.sse) / 1024.0, s.snr);
    check(s.max_err == 1, "A=51 max error 1");
    check(s.sse == 510, "A=51 MSE 0.4980");
    check(near(s.snr, 102.3519, 0.001), "A=51 SNR 102.3519");
    check(s.snr > 90.0, "A=51 meets the 90 dB constraint");

    // Signed example: maximum deviation from x/10 over all 8-bit inputs.
    maxe_new = 0.0; maxe_old = 0.0;
    for (int v = -128; v < 128; v++) begin
      @(posedge clk);
      xs = 8'(v);
      #1;
      ideal = real'(v) / 10.0;
      got   = real'($signed(ys_new)) / 256.0;
      check($signed(ys_new) == 13'(v * 26), $sformatf("13/128 x=%0d y=%0d", v, $signed(ys_new)));
      if (got - ideal > maxe_new) maxe_new = got - ideal;
      if (ideal - got > maxe_new) maxe_new = ideal - got;
      got = real'($signed(ys_old)) / 256.0;
      if (got - ideal > maxe_old) maxe_old = got - ideal;
      if (ideal - got > maxe_old) maxe_old = ideal - got;
    end
    $display("d=10 signed: max |error| 13/128 = %f, 25/256 = %f", maxe_new, maxe_old);
    check(near(maxe_new, 0.2, 1.0e-6), "13/128 maximum error 0.2");
    check(near(maxe_old, 0.3, 1.0e-6), "25/256 maximum error 0.3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
