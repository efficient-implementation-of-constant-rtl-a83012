// cdiv_range -- constant divider with range decomposition.
//
// The input range is split into two adjacent intervals, [0, SPLIT) and
// [SPLIT, 2^XW), and each interval gets its own approximating function.  Both
// functions share one constant multiplier and differ only in an additive
// constant, so the second interval costs one small adder and a comparison:
//
//     y = floor( (x*A + C) / 2^K ),   C = C_LO if x < SPLIT, else C_HI
//
// with C_LO and C_HI in units of 2^-K.  This lets a short coefficient be exact
// where a single function would need a longer one.  With the defaults
// (D = 5, 7-bit dividend, A/2^K = 13/64) the first function 13x/64 gives
// floor(x/5) exactly for 0..63 but drifts above it beyond; the second function
// 13x/64 - 13/64 = 13(x-1)/64 re-centres the error and is exact for 64..127.
// A single coefficient with the same exactness over 0..127 needs K = 9.
//
// Interface: x (XW bits, unsigned) in, y (YW bits) out, and sel_hi, which
// shows the interval in use; purely combinational.
//
// Follows the design: two adjacent intervals, one shared multiplication, an
// additive constant as the only difference, d = 5 and x in 0..127 with zero
// fraction bits.  Own choices: the coefficient 13/64 and the offsets 0 and
// -13/64, found by an exhaustive search for the shortest exact pair.
module cdiv_range
  import cdiv_pkg::*;
#(
  parameter int unsigned     XW    = 7,
  parameter longint unsigned D     = 5,    // divisor the functions stand for
  parameter longint unsigned A     = 13,
  parameter int unsigned     K     = 6,
  parameter int unsigned     SPLIT = 64,   // first input of the upper interval
  parameter int              C_LO  = 0,    // offset of the lower interval, units of 2^-K
  parameter int              C_HI  = -13,  // offset of the upper interval, units of 2^-K
  parameter int unsigned     YW    = XW + bits_of(A) - K
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          sel_hi
);

  // Product width plus a sign bit and a carry bit for the offset.
  localparam int unsigned PW = XW + bits_of(A) + 2;

  initial begin
    assert (D > 0) else $error("cdiv_range: D must be positive");
    assert (K < PW) else $error("cdiv_range: K too large for the product");
  end

  logic [PW-1:0] prod;
  logic [PW-1:0] sum;
  logic [PW-1:0] shifted;

  cdiv_cmul #(.XW(XW), .PW(PW), .SIGNED(1'b0), .A(A)) u_mul (.x(x), .p(prod));

  assign sel_hi  = (PW'(x) >= PW'(SPLIT));
  assign sum     = prod + (sel_hi ? PW'(C_HI) : PW'(C_LO));
  assign shifted = PW'($signed(sum) >>> K);
  assign y       = YW'(shifted);

endmodule
