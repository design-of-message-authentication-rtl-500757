// mac_pkg: constants and small pure functions shared by the AES-128 / SHA-1
// message-authentication design.
//
// GF(2^8) arithmetic uses the AES field polynomial x^8+x^4+x^3+x+1 (0x11B).
// Squaring in GF(2^8) is a linear map, so the power boxes A^2, A^4, A^8 and
// A^32 of the field inverter are XOR networks built from gf_sq.  The
// constant multiplications of MixColumns / InvMixColumns use gf_mul_const,
// which synthesises to XOR trees once one operand is a constant.  The
// SHA-1 constants are those of FIPS 180-1.
package mac_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block128_t;
  typedef logic [159:0] digest_t;
  typedef logic [511:0] block512_t;

  // Multiply by x modulo 0x11B.
  function automatic byte_t gf_xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // Shift-and-add multiplier; used with a constant operand only.
  function automatic byte_t gf_mul_const(byte_t a, byte_t b);
    byte_t p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = gf_xtime(t);
    end
    return p;
  endfunction

  // Squaring: spread the bits to even positions, then reduce.
  function automatic byte_t gf_sq(byte_t a);
    logic [14:0] s;
    s = '0;
    for (int i = 0; i < 8; i++) s[2*i] = a[i];
    for (int i = 14; i >= 8; i--)
      if (s[i]) s[i-:9] = s[i-:9] ^ 9'h11B;
    return s[7:0];
  endfunction

  // a^(2^n) by n squarings.
  function automatic byte_t gf_pow2n(byte_t a, int n);
    byte_t r;
    r = a;
    for (int i = 0; i < n; i++) r = gf_sq(r);
    return r;
  endfunction

  // AES affine transform applied after inversion (SubBytes).
  function automatic byte_t aes_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse affine transform applied before inversion (InvSubBytes).
  function automatic byte_t aes_inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  // Round constant of the key schedule for round i (1..10).
  function automatic byte_t aes_rcon(logic [3:0] i);
    byte_t r;
    r = 8'h01;
    for (int k = 1; k < 10; k++)
      if (k < int'(i)) r = gf_xtime(r);
    return r;
  endfunction

  // SHA-1 initial chaining value H0..H4.
  localparam digest_t SHA1_H_INIT =
    {32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  // SHA-1 round constant K_t.
  function automatic word_t sha1_k(logic [6:0] t);
    if (t < 7'd20)      return 32'h5A827999;
    else if (t < 7'd40) return 32'h6ED9EBA1;
    else if (t < 7'd60) return 32'h8F1BBCDC;
    else                return 32'hCA62C1D6;
  endfunction

  // SHA-1 round function f_t(B,C,D).
  function automatic word_t sha1_f(logic [6:0] t, word_t b, word_t c, word_t d);
    if (t < 7'd20)      return (b & c) | (~b & d);
    else if (t < 7'd40) return b ^ c ^ d;
    else if (t < 7'd60) return (b & c) | (b & d) | (c & d);
    else                return b ^ c ^ d;
  endfunction

endpackage
