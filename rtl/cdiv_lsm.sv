// cdiv_lsm -- constant coefficient divider on a left-sided (truncated)
// multiplier.
//
// Approximates y = floor(x / D) for an unsigned XW-bit dividend as
//
//     y = floor( ( sum over set bits i of A of  floor(x * 2^i / 2^T) * 2^T ) / 2^K )
//
// i.e. every partial product x*2^i of the binary constant A loses its bits
// below column T before the partial products are added, and the sum is then
// truncated by K bits like in the full-precision divider.  With T = 0 the
// result equals floor(x*A/2^K).  Dropping the low columns removes most of the
// adder cells; the resulting systematic under-estimate is compensated by
// raising A above its exact value, which is the point of the upper-nearest
// choice.  The defaults (D = 5, A = 208, K = 10, T = 10, XW = 10) are the
// smallest configuration evaluated for this scheme: maximum error 3, mean
// squared error 1.6406 and SNR 90.43 (on a 10*ln scale) over 0..1023.
//
// Interface: x (XW bits) in, y (YW bits) out; purely combinational.
//
// Follows the design: binary partial products truncated at column T, the
// final K-bit truncation, the parameter values.  Own choices: how "truncated
// to t bits" is read (columns below T discarded, which reproduces the
// published error figures), unsigned operands only, and the output width.
module cdiv_lsm
  import cdiv_pkg::*;
#(
  parameter int unsigned     XW = 10,   // dividend width
  parameter longint unsigned D  = 5,    // divisor the constant stands for
  parameter longint unsigned A  = 208,  // multiplying constant
  parameter int unsigned     K  = 10,   // final shift
  parameter int unsigned     T  = 10,   // partial-product truncation column
  parameter int unsigned     YW = XW + bits_of(A) - K
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] y
);

  localparam int unsigned AW = bits_of(A);
  localparam int unsigned PW = XW + AW;  // full product width
  localparam logic [63:0] A_BITS = 64'(A);

  initial begin
    assert (T <= K) else $error("cdiv_lsm: T must not exceed K");
    assert (T < PW) else $error("cdiv_lsm: T must be below the product width");
    assert (D > 0) else $error("cdiv_lsm: D must be positive");
  end

  // Sum of the truncated partial products, kept in units of 2^T.
  logic [PW-T-1:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < AW; i++) begin
      if (A_BITS[i]) acc = acc + (PW-T)'((PW'(x) << i) >> T);
    end
  end

  // Remaining K-T bits of the final shift.
  logic [PW-T-1:0] shifted;
  assign shifted = acc >> (K - T);
  assign y = YW'(shifted);

endmodule
