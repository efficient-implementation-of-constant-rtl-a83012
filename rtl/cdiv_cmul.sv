// cdiv_cmul -- multiplier by a constant, built from shifts and adders.
//
// p = x * A, computed as the sum of x shifted by i for every +1 digit and
// minus x shifted by i for every -1 digit of the canonical signed digit
// (CSD) form of A.  CSD has no two adjacent non-zero digits, so a run of ones
// in A costs one adder and one subtractor instead of one adder per bit.
// All arithmetic is modulo 2^PW: intermediate sums may wrap, but when the true
// product fits in PW bits (PW >= XW + bits of A, plus one when SIGNED) the
// result is exact.
//
// Interface: x (XW bits, two's complement when SIGNED) in, p (PW bits) out;
// purely combinational.  It is the shared constant-multiplier core of the
// full-precision dividers; the recoding is this design's choice of how to
// remove redundant additions.
module cdiv_cmul
  import cdiv_pkg::*;
#(
  parameter int unsigned     XW     = 10,
  parameter int unsigned     PW     = 19,
  parameter bit              SIGNED = 1'b0,
  parameter longint unsigned A      = 205
) (
  input  logic [XW-1:0] x,
  output logic [PW-1:0] p
);

  localparam logic [63:0] POS_M = csd_pos(A);
  localparam logic [63:0] NEG_M = csd_neg(A);

  initial begin
    assert (PW >= XW) else $error("cdiv_cmul: PW must be at least XW");
  end

  logic [PW-1:0] x_ext;

  assign x_ext = SIGNED ? PW'({{(PW-XW){x[XW-1]}}, x}) : PW'(x);

  always_comb begin
    p = '0;
    for (int unsigned i = 0; i < PW && i < 64; i++) begin
      if (POS_M[i]) p = p + (x_ext << i);
      if (NEG_M[i]) p = p - (x_ext << i);
    end
  end

endmodule
