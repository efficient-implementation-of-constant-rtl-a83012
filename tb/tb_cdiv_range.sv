// tb_cdiv_range -- self-checking testbench of the range-decomposed divider.
//
// Sweeps every 7-bit dividend and compares the output with floor(x/5), and
// the interval select with x >= 64.  It also confirms, from the testbench's
// own arithmetic, that the lower function 13x/64 alone would be wrong in the
// upper interval, so the second interval's offset is what makes the result
// exact.  A clocked watchdog ends a stalled run.
`timescale 1ns/1ps
module tb_cdiv_range;

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

  logic [6:0] x;
  logic [4:0] y;
  logic       sel_hi;

  cdiv_range u_dut (.x(x), .y(y), .sel_hi(sel_hi));

  initial begin
    int single_wrong = 0, hi_used = 0, lo_used = 0;
    for (int v = 0; v < 128; v++) begin
      @(posedge clk);
      x = 7'(v);
      #1;
      check(int'(y) == v / 5, $sformatf("x=%0d y=%0d", v, y));
      check(sel_hi == (v >= 64), $sformatf("x=%0d interval select", v));
      if (sel_hi) hi_used++; else lo_used++;
      if ((13 * v) / 64 != v / 5) single_wrong++;
    end
    $display("lower interval used %0d times, upper %0d; single function wrong at %0d inputs",
             lo_used, hi_used, single_wrong);
    check(single_wrong > 0, "one function alone is not exact over 0..127");
    check(lo_used == 64 && hi_used == 64, "both intervals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
