// gf_inv: multiplicative inverse in GF(2^8) (mod 0x11B) computed as A^254,
// with 0 mapping to 0, as needed by the AES byte substitution.
//
// Structure (improved inverter with three multipliers):
//   A^3   = A^2 * A            (the "A^3" power box)
//   A^4   = (A^2)^2            (squaring box, linear)
//   A^6   = (A^3)^2,  A^24 = (A^3)^8
//   A^30  = A^6 * A^24         (multiplier 1)
//   A^7   = A^3 * A^4          (multiplier 2)
//   A^224 = (A^7)^32
//   A^254 = A^30 * A^224       (multiplier 3)
// i.e. A^-1 = ((A^3)^2 * (A^3)^8) * ((A^3) * (A^4))^32.  Squarings are XOR
// networks; the A^3 box holds one more multiplier, so the block has four
// multiplier instances in all (three between power boxes, one inside A^3).
//
// Interface: a in, inv out.  Combinational.
module gf_inv
  import mac_pkg::*;
(
  input  byte_t a,
  output byte_t inv
);
  byte_t a2, a3, a4, a6, a24, a30, a7, a224;

  assign a2   = gf_sq(a);
  assign a4   = gf_sq(a2);
  assign a6   = gf_sq(a3);
  assign a24  = gf_pow2n(a3, 3);
  assign a224 = gf_pow2n(a7, 5);

  gf_mul u_cube (.a(a2),  .b(a),    .p(a3));
  gf_mul u_m30  (.a(a6),  .b(a24),  .p(a30));
  gf_mul u_m7   (.a(a3),  .b(a4),   .p(a7));
  gf_mul u_m254 (.a(a30), .b(a224), .p(inv));
endmodule
