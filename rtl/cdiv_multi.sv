// cdiv_multi -- several constant fractions N_i/D of one dividend with one
// shared reciprocal multiplier.
//
// All fractions share the same divisor D, so the product p = x * A, with
// A/2^K approximating 1/D, is formed once; each fraction then costs one more
// constant multiplication and its own K-bit truncation:
//
//     y[i] = floor( (p * N[i]) / 2^K )  =  floor(x * N[i] / D)
//
// The second form holds while x*N[i] stays inside the range of exactitude of
// A/2^K, so by default K is the smallest shift whose upper-nearest A is exact
// for inputs of XW + bits(NMAX) bits, NMAX being the largest numerator.
//
// Interface: x (XW bits, unsigned) in, y[0..NF-1] (YW bits each) out;
// purely combinational.
//
// Follows the design: a shared divider plus one multiplication per fraction.
// Own choices: the example numerators 1, 2 and 3 over D = 5 (none are given),
// the exactness-driven default of K, and the output width.
module cdiv_multi
  import cdiv_pkg::*;
#(
  parameter int unsigned     XW        = 10,
  parameter longint unsigned D         = 5,
  parameter int unsigned     NF        = 3,
  parameter longint unsigned N [NF]    = '{1, 2, 3},
  parameter longint unsigned NMAX      = 3,  // largest entry of N
  parameter int unsigned     K         = min_k_exact(1, D, XW + bits_of(NMAX)),
  parameter longint unsigned A         = coef_a(1, D, K, CRIT_UPPER),
  parameter int unsigned     YW        = XW + bits_of(NMAX)
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] y [NF]
);

  localparam int unsigned PW = XW + bits_of(A) + 1;       // shared product
  localparam int unsigned QW = PW + bits_of(NMAX) + 1;    // per-fraction product

  initial begin
    for (int i = 0; i < NF; i++)
      assert (N[i] <= NMAX) else $error("cdiv_multi: N[%0d] exceeds NMAX", i);
  end

  logic [PW-1:0] p;

  cdiv_cmul #(.XW(XW), .PW(PW), .SIGNED(1'b0), .A(A)) u_recip (.x(x), .p(p));

  for (genvar i = 0; i < NF; i++) begin : g_frac
    logic [QW-1:0] q;
    logic [QW-1:0] shifted;
    cdiv_cmul #(.XW(PW), .PW(QW), .SIGNED(1'b0), .A(N[i])) u_num (.x(p), .p(q));
    assign shifted = q >> K;
    assign y[i]    = YW'(shifted);
  end

endmodule
