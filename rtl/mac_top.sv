// mac_top: message authentication code built from SHA-1 and AES-128,
// MAC = E_k(Partial-SHA-1(M)), where Partial-SHA-1 keeps the left-most 128
// of the 160 digest bits and k is the 128-bit secret key.
//
// Generation (de_encrypt = 0): on start the 128-bit message data_in is padded
// to one 512-bit block and hashed by sha1_core (82 cycles); the left-most 128
// digest bits then go through aes_core in encryption mode with key_in as the
// key (11 cycles).  data_out takes the MAC and done pulses 94 cycles after
// the cycle in which start was high.
// Verification (de_encrypt = 1): data_in is a received MAC; aes_core decrypts
// it with key_in (21 cycles) and data_out returns the partial digest it
// carries, with done 22 cycles after the start cycle.  The digest contrast
// unit compares the decrypted value with own_digest, the partial SHA-1 of
// the received message that the receiver computed with a SHA-1 of its own;
// digest_match is valid, with match_valid high, in the same cycle as done.  A falsified MAC decrypts to an unrelated value and
// gives digest_match = 0.
//
// The seven signals clk, de_encrypt, rst, start, data_in, key_in and
// data_out (3 x 128 + 4 = 388 pins) are the device interface of the published architecture.
// done, own_digest, digest_match and match_valid are additions of this
// implementation: the first so a user need not count cycles, the others
// bring out the receiver's contrast step, which in the published architecture sits outside
// the MAC device.  key_in and data_in are sampled at the start edge.
// rst is synchronous and active high; data_out resets to zero.
module mac_top
  import mac_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      de_encrypt,
  input  block128_t data_in,
  input  block128_t key_in,
  output block128_t data_out,
  output logic      done,
  input  block128_t own_digest,
  output logic      digest_match,
  output logic      match_valid
);
  typedef enum logic [1:0] {S_IDLE, S_HASH, S_CIPHER} state_e;

  state_e    st_q;
  logic      dec_q;
  block128_t key_q;
  block512_t sha_blk;
  digest_t   sha_cv;
  block128_t partial_digest;
  block128_t aes_dout;
  logic      sha_start, sha_done, sha_busy;
  logic      aes_start, aes_done, aes_busy;

  // SHA-1 message padding of the 128-bit message to one 512-bit block: the
  // message, a single 1 bit, zeros, and the length (128) in the last 64 bits.
  assign sha_blk = {data_in, 1'b1, 319'b0, 64'd128};

  // SHA-1 (one block, initial chaining value H0..H4).

  assign sha_start = (st_q == S_IDLE) && start && !de_encrypt;

  sha1_core u_sha (
    .clk, .rst, .start(sha_start), .blk(sha_blk), .cv_in(SHA1_H_INIT),
    .cv_out(sha_cv), .done(sha_done), .busy(sha_busy)
  );

  // Partial SHA-1: the left-most 128 bits of the 160-bit digest.
  assign partial_digest = sha_cv[159:32];

  // AES-128: encrypts the partial digest, or decrypts a received MAC.
  assign aes_start = ((st_q == S_IDLE) && start && de_encrypt) ||
                     ((st_q == S_HASH) && sha_done);

  aes_core u_aes (
    .clk, .rst, .start(aes_start), .dec((st_q == S_IDLE) ? de_encrypt : dec_q),
    .din((st_q == S_IDLE) ? data_in : partial_digest),
    .key((st_q == S_IDLE) ? key_in : key_q),
    .dout(aes_dout), .done(aes_done), .busy(aes_busy)
  );

  // Receiver's contrast of the decrypted digest with its own digest.
  digest_contrast #(.WIDTH(128)) u_contrast (
    .clk, .rst, .check(aes_done && dec_q),
    .dec_digest(aes_dout), .own_digest,
    .match(digest_match), .valid(match_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q     <= S_IDLE;
      dec_q    <= 1'b0;
      key_q    <= '0;
      data_out <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          dec_q <= de_encrypt;
          key_q <= key_in;
          st_q  <= de_encrypt ? S_CIPHER : S_HASH;
        end
        S_HASH:   if (sha_done) st_q <= S_CIPHER;
        S_CIPHER: if (aes_done) begin
          data_out <= aes_dout;
          done     <= 1'b1;
          st_q     <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (rst) !(sha_busy && aes_busy));
endmodule
