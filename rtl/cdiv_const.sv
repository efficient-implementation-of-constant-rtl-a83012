// cdiv_const -- constant coefficient divider (full-precision multiplier).
//
// Computes y = floor(x * NUM / D) without a divider: x is multiplied by an
// integer constant A and the product is shifted right by K bits, keeping YF
// fraction bits in the result:
//
//     y = Q(x * A / 2^(K - YF))          (A / 2^K approximates NUM / D)
//
// Q is the underflow strategy RND of the final shift: truncation towards
// minus infinity (the default), round half up, or ceiling.  The criterion
// for A follows RND so that A compensates the bias of the shift: above the
// ideal value for truncation, nearest for rounding, below for ceiling.
// By default K is the smallest shift for which that A gives quotients
// identical to the ideal ones for every XW-bit unsigned input (the
// range-of-exactitude bound); with truncation, for D = 3, 5 and 23 and
// 10-bit inputs, this gives A/K = 683/11, 205/10 and 713/14.
// Smaller K, or another criterion, trade exactness for fewer adders; the
// quotient error is then bounded but non-zero (e.g. A = 51, K = 8 for D = 5).
//
// The constant multiplication (cdiv_cmul) is a sum of shifted copies of x,
// one per non-zero canonical-signed-digit of A, so that a run of ones in A
// costs one adder and one subtractor instead of one adder per bit.
//
// Interface: x (XW bits, two's complement when SIGNED) in, y (YW bits, same
// signedness, YF fraction bits) out.  Purely combinational, no clock.
//
// Follows the design: multiply-and-shift structure, the pairing of criterion
// and underflow strategy, exactness bound, truncation as the default.  Own choices: CSD recoding as
// the adder-saving step, and the default output width YW.
module cdiv_const
  import cdiv_pkg::*;
#(
  parameter int unsigned     XW     = 10,   // dividend width
  parameter bit              SIGNED = 1'b0, // dividend and quotient signed
  parameter longint unsigned NUM    = 1,    // numerator of the constant n/d
  parameter longint unsigned D      = 5,    // divisor
  parameter rnd_e            RND    = RND_TRUNC,   // final-shift rounding
  parameter crit_e           CRIT   = crit_for(RND),
  parameter int unsigned     K      = min_k_exact(NUM, D, XW, CRIT),
  parameter longint unsigned A      = coef_a(NUM, D, K, CRIT),
  parameter int unsigned     YF     = 0,    // fraction bits of the quotient
  parameter int unsigned     YW     = XW + bits_of(A) + YF - K
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] y
);

  localparam int unsigned PW = XW + bits_of(A) + 1;  // one spare bit for CSD

  initial begin
    assert (A > 0) else $error("cdiv_const: A must be positive");
    assert (YW >= 1) else $error("cdiv_const: YW must be at least 1");
  end

  logic [PW-1:0] prod;

  // Shift-and-add constant multiplier over the CSD digits of A.
  cdiv_cmul #(.XW(XW), .PW(PW), .SIGNED(SIGNED), .A(A)) u_mul (.x(x), .p(prod));

  // Final K-bit shift, keeping YF fraction bits.  Rounding and ceiling add
  // half, or all but one, of the dropped weight before the truncating shift.
  if (K >= YF) begin : g_shr
    localparam int unsigned S = K - YF;
    localparam logic [PW-1:0] BIAS =
        (S == 0)           ? '0 :
        (RND == RND_ROUND) ? PW'(1) << (S - 1) :
        (RND == RND_CEIL)  ? (PW'(1) << S) - PW'(1) : '0;
    logic [PW-1:0] biased;
    logic [PW-1:0] shifted;
    assign biased  = prod + BIAS;
    assign shifted = SIGNED ? PW'($signed(biased) >>> S) : (biased >> S);
    assign y = YW'(shifted);
  end else begin : g_shl
    logic [PW+YF-K-1:0] shifted;
    assign shifted = {prod, {(YF - K){1'b0}}};
    assign y = YW'(shifted);
  end

endmodule
