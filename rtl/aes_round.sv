// aes_round: one AES-128 round, forward or inverse, combinational.
//
// Byte k of the 128-bit state is bits [127-8k -: 8]; the state is filled
// column by column, so byte k sits in row k%4, column k/4 (FIPS-197 order).
//
// Encryption (dec = 0): ByteSub -> ShiftRow -> MixColumn -> AddRoundKey;
//   in the final round (final_rnd = 1) MixColumn is left out.
// Decryption (dec = 1): InvShiftRow -> InvByteSub -> AddRoundKey ->
//   InvMixColumn; in the final round InvMixColumn is left out.
// ShiftRow is applied before ByteSub in both directions (they commute), so the
// sixteen S-box units sit on one path shared by encryption and decryption.
// The round sequence follows the standard algorithm; the shared data path
// and the inverse-cipher ordering are this design's choices.
//
// Interface: state_in, rk (round key of this round), dec, final_rnd ->
// state_out.  No clock; the caller registers the result.
module aes_round
  import mac_pkg::*;
(
  input  block128_t state_in,
  input  block128_t rk,
  input  logic      dec,
  input  logic      final_rnd,
  output block128_t state_out
);
  byte_t s  [16];
  byte_t sh [16];
  byte_t sb [16];
  byte_t mx [16];
  byte_t ak [16];
  byte_t im [16];
  byte_t k  [16];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      s[i] = state_in[127-8*i -: 8];
      k[i] = rk[127-8*i -: 8];
    end
    // (Inv)ShiftRow: row r of column c takes the byte of column c+r (c-r).
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sh[r+4*c] = dec ? s[r + 4*((c - r + 4) % 4)] : s[r + 4*((c + r) % 4)];
  end

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.x(sh[i]), .dec(dec), .y(sb[i]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      // MixColumn
      mx[4*c+0] = gf_xtime(sb[4*c+0]) ^ gf_mul_const(sb[4*c+1], 8'h03) ^ sb[4*c+2] ^ sb[4*c+3];
      mx[4*c+1] = sb[4*c+0] ^ gf_xtime(sb[4*c+1]) ^ gf_mul_const(sb[4*c+2], 8'h03) ^ sb[4*c+3];
      mx[4*c+2] = sb[4*c+0] ^ sb[4*c+1] ^ gf_xtime(sb[4*c+2]) ^ gf_mul_const(sb[4*c+3], 8'h03);
      mx[4*c+3] = gf_mul_const(sb[4*c+0], 8'h03) ^ sb[4*c+1] ^ sb[4*c+2] ^ gf_xtime(sb[4*c+3]);
    end
    for (int i = 0; i < 16; i++)
      ak[i] = sb[i] ^ k[i];
    for (int c = 0; c < 4; c++) begin
      // InvMixColumn
      im[4*c+0] = gf_mul_const(ak[4*c+0], 8'h0E) ^ gf_mul_const(ak[4*c+1], 8'h0B)
                ^ gf_mul_const(ak[4*c+2], 8'h0D) ^ gf_mul_const(ak[4*c+3], 8'h09);
      im[4*c+1] = gf_mul_const(ak[4*c+0], 8'h09) ^ gf_mul_const(ak[4*c+1], 8'h0E)
                ^ gf_mul_const(ak[4*c+2], 8'h0B) ^ gf_mul_const(ak[4*c+3], 8'h0D);
      im[4*c+2] = gf_mul_const(ak[4*c+0], 8'h0D) ^ gf_mul_const(ak[4*c+1], 8'h09)
                ^ gf_mul_const(ak[4*c+2], 8'h0E) ^ gf_mul_const(ak[4*c+3], 8'h0B);
      im[4*c+3] = gf_mul_const(ak[4*c+0], 8'h0B) ^ gf_mul_const(ak[4*c+1], 8'h0D)
                ^ gf_mul_const(ak[4*c+2], 8'h09) ^ gf_mul_const(ak[4*c+3], 8'h0E);
    end
    for (int i = 0; i < 16; i++) begin
      if (dec) state_out[127-8*i -: 8] = final_rnd ? ak[i] : im[i];
      else     state_out[127-8*i -: 8] = (final_rnd ? sb[i] : mx[i]) ^ k[i];
    end
  end
endmodule
