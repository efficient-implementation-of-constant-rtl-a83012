// tb_cdiv_top -- end-to-end testbench of the constant-divider set, with
// every parameter at its default.
//
// One complete operation is a sweep of every input value: all 1024 values of
// x (shared by the exact, noise-constrained, left-sided and multi-fraction
// units), all 256 signed values of xs and all 128 values of xr.  Every
// output is compared with integer or real arithmetic done in the testbench;
// the approximate units are held to their error budgets (maximum error 1
// for q5_noise, 3 for q5_lsm, 0.2 for ys).  Each mechanism is counted and
// must occur at least once: exact quotients, an approximation error in the
// noise-constrained unit, the left-sided unit below and above the exact
// quotient, negative signed inputs, both range-decomposition intervals.
// A clocked watchdog ends a stalled run.
`timescale 1ns/1ps
module tb_cdiv_top;

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

  logic [9:0]  x;
  logic [8:0]  q3;
  logic [7:0]  q5, q5_noise, q5_lsm;
  logic [5:0]  q23;
  logic [7:0]  xs;
  logic [12:0] ys;
  logic [6:0]  xr;
  logic [4:0]  qr;
  logic        qr_hi;
  logic [11:0] qm [3];

  cdiv_top u_top (.*);

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    int n_exact = 0, n_noise_err = 0, n_lsm_below = 0, n_lsm_above = 0;
    int n_neg = 0, n_lo = 0, n_hi = 0, n_multi = 0, e;
    longint sig = 0, sse_noise = 0, sse_lsm = 0;
    real ideal, got, snr;

    xs = '0;
    xr = '0;
    for (int v = 0; v < 1024; v++) begin
      @(posedge clk);
      x = 10'(v);
      #1;
      check(int'(q3) == v / 3, $sformatf("q3 x=%0d", v));
      check(int'(q5) == v / 5, $sformatf("q5 x=%0d", v));
      check(int'(q23) == v / 23, $sformatf("q23 x=%0d", v));
      if (int'(q3) == v / 3 && int'(q5) == v / 5 && int'(q23) == v / 23) n_exact++;
      e = int'(q5_noise) - v / 5;
      check(iabs(e) <= 1, $sformatf("q5_noise x=%0d error %0d", v, e));
      if (e != 0) n_noise_err++;
      sse_noise += longint'(e * e);
      e = int'(q5_lsm) - v / 5;
      check(iabs(e) <= 3, $sformatf("q5_lsm x=%0d error %0d", v, e));
      if (e < 0) n_lsm_below++;
      if (e > 0) n_lsm_above++;
      sse_lsm += longint'(e * e);
      sig += longint'((v / 5) * (v / 5));
      for (int i = 0; i < 3; i++) begin
        check(int'(qm[i]) == (v * (i + 1)) / 5, $sformatf("qm[%0d] x=%0d", i, v));
        n_multi++;
      end
    end
    snr = 10.0 * $ln(real'(sig) / real'(sse_noise));
    $display("q5_noise SNR %f, q5_lsm SNR %f", snr, 10.0 * $ln(real'(sig) / real'(sse_lsm)));
    check(snr > 90.0, "q5_noise meets SNR 90");
    check(10.0 * $ln(real'(sig) / real'(sse_lsm)) > 90.0, "q5_lsm meets SNR 90");

    for (int v = -128; v < 128; v++) begin
      @(posedge clk);
      xs = 8'(v);
      #1;
      ideal = real'(v) / 10.0;
      got   = real'($signed(ys)) / 256.0;
      check(got - ideal <= 0.2 + 1.0e-9 && ideal - got <= 0.2 + 1.0e-9,
            $sformatf("ys xs=%0d got %f", v, got));
      if (v < 0) n_neg++;
    end

    for (int v = 0; v < 128; v++) begin
      @(posedge clk);
      xr = 7'(v);
      #1;
      check(int'(qr) == v / 5, $sformatf("qr xr=%0d", v));
      if (qr_hi) n_hi++; else n_lo++;
    end

    $display("mechanisms: exact=%0d noise_err=%0d lsm_below=%0d lsm_above=%0d",
             n_exact, n_noise_err, n_lsm_below, n_lsm_above);
    $display("            signed_neg=%0d range_lo=%0d range_hi=%0d multi=%0d",
             n_neg, n_lo, n_hi, n_multi);
    check(n_exact > 0, "exact division happened");
    check(n_noise_err > 0, "noise-constrained error happened");
    check(n_lsm_below > 0, "left-sided result below exact happened");
    check(n_lsm_above > 0, "left-sided result above exact happened");
    check(n_neg > 0, "negative signed dividend happened");
    check(n_lo > 0, "lower range interval happened");
    check(n_hi > 0, "upper range interval happened");
    check(n_multi > 0, "multi-fraction outputs happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
