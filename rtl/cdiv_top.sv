// cdiv_top -- the evaluated constant dividers, side by side.
//
// Each output is one division by a constant, implemented as a constant
// multiplication and a shift, in the configuration singled out for it:
//
//   q3, q5, q23  exact floor(x/3), floor(x/5), floor(x/23) for every 10-bit
//                x: A/2^K = 683/2^11, 205/2^10, 713/2^14 (upper-nearest).
//   q5_noise     floor(x/5) within an SNR constraint of 90 (10*ln scale):
//                A/2^K = 51/2^8, maximum error 1, the smallest of the
//                candidates that meet the constraint.
//   q5_lsm       floor(x/5) on a left-sided multiplier, partial products
//                truncated below column 10, A raised from 205 to 208 to
//                cancel the truncation bias: maximum error 3, SNR 90.43.
//   ys           signed 8-bit xs divided by 10 with 8 fraction bits,
//                A/2^K = 13/2^7 (maximum deviation 0.2 from xs/10).
//   qr, qr_hi    floor(xr/5) for 7-bit xr by range decomposition: 13x/64 on
//                0..63, 13(x-1)/64 on 64..127; qr_hi flags the upper range.
//   qm[i]        floor(x*(i+1)/5), i = 0..2, from one shared reciprocal
//                multiplier and one extra constant multiplier per fraction.
//
// Everything is combinational; there is no clock.  Which configurations are
// brought together here is this design's choice; each unit's parameters
// are the published ones except for the range-decomposition constants and
// the multi-fraction numerators, which are this design's own.
module cdiv_top
  import cdiv_pkg::*;
(
  input  logic [9:0]  x,
  output logic [8:0]  q3,
  output logic [7:0]  q5,
  output logic [5:0]  q23,
  output logic [7:0]  q5_noise,
  output logic [7:0]  q5_lsm,
  input  logic [7:0]  xs,
  output logic [12:0] ys,
  input  logic [6:0]  xr,
  output logic [4:0]  qr,
  output logic        qr_hi,
  output logic [11:0] qm [3]
);

  cdiv_const #(.D(3))  u_exact3  (.x(x), .y(q3));
  cdiv_const #(.D(5))  u_exact5  (.x(x), .y(q5));
  cdiv_const #(.D(23)) u_exact23 (.x(x), .y(q23));

  cdiv_const #(.D(5), .K(8), .A(51)) u_noise5 (.x(x), .y(q5_noise));

  cdiv_lsm #(.XW(10), .D(5), .A(208), .K(10), .T(10)) u_lsm5 (.x(x), .y(q5_lsm));

  cdiv_const #(.XW(8), .SIGNED(1'b1), .D(10), .CRIT(CRIT_NEAREST), .K(7), .YF(8))
    u_signed10 (.x(xs), .y(ys));

  cdiv_range u_range5 (.x(xr), .y(qr), .sel_hi(qr_hi));

  cdiv_multi u_multi5 (.x(x), .y(qm));

endmodule
