// tb_cdiv_lsm -- self-checking testbench of the left-sided-multiplier
// divider.
//
// Six instances, one per published configuration of a divide-by-5 with a
// 10-bit dividend (A = 205..208, K = 10, truncation column T = 8..10), are
// swept over every input 0..1023.  Each output is compared with a reference
// built from integer division of the individual partial products, and the
// error statistics against floor(x/5) (maximum error, mean squared error,
// SNR = 10*ln(signal/error power)) are compared with the tabulated figures.
// The shape of the error is also checked: A = 205 with T = 10 never exceeds
// the exact quotient, while A = 208 falls below it for small inputs and
// rises above it for large ones.  A clocked watchdog ends a stalled run.
`timescale 1ns/1ps
module tb_cdiv_lsm;

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

  localparam int NC = 6;
  localparam int CA [NC] = '{205, 208, 204, 205, 206, 206};
  localparam int CT [NC] = '{10, 10, 9, 9, 9, 8};
  // Expected figures: maximum error, SNR (10*ln scale) and mean squared error.
  localparam int  EXP_ME  [NC] = '{4, 3, 3, 2, 2, 1};
  localparam real EXP_SNR [NC] = '{80.6984, 90.4305, 90.2887, 94.3082, 101.1003, 106.4655};
  localparam real EXP_MSE [NC] = '{4.3418, 1.6406, 1.6641, 1.1133, 0.5645, 0.3301};

  logic [9:0] x;
  logic [7:0] y [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    cdiv_lsm #(.A(CA[g]), .K(10), .T(CT[g])) u_dut (.x(x), .y(y[g]));
  end

  // Reference: each partial product x*2^i loses its value below 2^t.
  function automatic int ref_lsm(input int xv, input int a, input int t);
    int acc = 0;
    for (int i = 0; i < 12; i++)
      if ((a >> i) & 1) acc += ((xv * (1 << i)) / (1 << t)) * (1 << t);
    return acc / 1024;
  endfunction

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    longint sig;
    longint sse [NC];
    int     me [NC];
    int     e;
    bit     above205, below208_small, above208_large;
    real    snr, mse;

    sig = 0;
    above205 = 0; below208_small = 0; above208_large = 0;
    for (int c = 0; c < NC; c++) begin
      sse[c] = 0;
      me[c]  = 0;
    end

    for (int v = 0; v < 1024; v++) begin
      @(posedge clk);
      x = 10'(v);
      #1;
      sig += longint'((v / 5) * (v / 5));
      for (int c = 0; c < NC; c++) begin
        check(int'(y[c]) == ref_lsm(v, CA[c], CT[c]),
              $sformatf("A=%0d t=%0d x=%0d y=%0d ref=%0d", CA[c], CT[c], v, y[c],
                        ref_lsm(v, CA[c], CT[c])));
        e = int'(y[c]) - v / 5;
        sse[c] += longint'(e * e);
        if ((e < 0 ? -e : e) > me[c]) me[c] = (e < 0 ? -e : e);
      end
      if (int'(y[0]) > v / 5) above205 = 1;
      if (v < 256 && int'(y[1]) < v / 5) below208_small = 1;
      if (v >= 768 && int'(y[1]) > v / 5) above208_large = 1;
    end

    for (int c = 0; c < NC; c++) begin
      snr = 10.0 * $ln(real'(sig) / real'(sse[c]));
      mse = real'(sse[c]) / 1024.0;
      $display("A=%0d k=10 t=%0d : ME=%0d MSE=%f SNR=%f", CA[c], CT[c], me[c], mse, snr);
      check(me[c] == EXP_ME[c], $sformatf("A=%0d t=%0d max error", CA[c], CT[c]));
      check(near(snr, EXP_SNR[c], 0.001), $sformatf("A=%0d t=%0d SNR", CA[c], CT[c]));
      check(near(mse, EXP_MSE[c], 0.0001), $sformatf("A=%0d t=%0d MSE", CA[c], CT[c]));
    end
    check(!above205, "A=205 t=10 stays at or below the exact quotient");
    check(below208_small, "A=208 t=10 falls below the exact quotient for small x");
    check(above208_large, "A=208 t=10 rises above the exact quotient for large x");

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
