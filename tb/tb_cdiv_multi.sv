// tb_cdiv_multi -- self-checking testbench of the shared-reciprocal
// multi-fraction divider.
//
// Sweeps every 10-bit dividend and compares the three outputs with
// floor(x*1/5), floor(x*2/5) and floor(x*3/5) computed by integer division
// in the testbench.  A second instance with other numerators (1, 4, 7 over
// 9) checks that the shared coefficient is re-derived from the parameters.
// A clocked watchdog ends a stalled run.
`timescale 1ns/1ps
module tb_cdiv_multi;

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

  localparam longint unsigned N2 [3] = '{1, 4, 7};

  logic [9:0]  x;
  logic [11:0] y [3];
  logic [12:0] y9 [3];

  cdiv_multi u_dut (.x(x), .y(y));
  cdiv_multi #(.D(9), .N(N2), .NMAX(7)) u_d9 (.x(x), .y(y9));

  initial begin
    $display("d=5: A=%0d K=%0d   d=9: A=%0d K=%0d", u_dut.A, u_dut.K, u_d9.A, u_d9.K);
    for (int v = 0; v < 1024; v++) begin
      @(posedge clk);
      x = 10'(v);
      #1;
      for (int i = 0; i < 3; i++) begin
        check(int'(y[i]) == (v * (i + 1)) / 5, $sformatf("%0d/5 x=%0d y=%0d", i + 1, v, y[i]));
        check(int'(y9[i]) == (v * int'(N2[i])) / 9,
              $sformatf("%0d/9 x=%0d y=%0d", N2[i], v, y9[i]));
      end
    end
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
