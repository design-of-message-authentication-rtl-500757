// aes_sbox: the AES ByteSub transformation and its inverse, computed without a
// look-up table.
//
// Forward (dec = 0): y = Affine(x^-1).  Inverse (dec = 1): y = (InvAffine(x))^-1.
// One field inverter (gf_inv) is shared by both directions; the affine and
// inverse-affine maps are XOR networks on either side of it, selected by dec.
// Using field inversion instead of a stored table follows the published architecture; sharing
// one inverter between encryption and decryption is this design's choice.
//
// Interface: x in, dec selects the direction, y out.  Combinational.
module aes_sbox
  import mac_pkg::*;
(
  input  byte_t x,
  input  logic  dec,
  output byte_t y
);
  byte_t inv_in, inv_out;

  assign inv_in = dec ? aes_inv_affine(x) : x;

  gf_inv u_inv (.a(inv_in), .inv(inv_out));

  assign y = dec ? inv_out : aes_affine(inv_out);
endmodule
