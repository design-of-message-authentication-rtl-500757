// sha1_w16: SHA-1 message schedule kept in sixteen 32-bit words instead of
// eighty.
//
// load copies the 512-bit block in as W0..W15 (W0 = left-most word).  The
// word of the current step t is always w[0].  Each shift moves the window on
// by one word and appends W(t+16) = S^1(W(t+13) ^ W(t+8) ^ W(t+2) ^ W(t)),
// which is the recurrence W_t = S^1(W_{t-3} ^ W_{t-8} ^ W_{t-14} ^ W_{t-16})
// re-indexed.  Using sixteen words rather than eighty follows the published
// architecture; keeping them as a shifting window (rather than a circular
// buffer addressed by t mod 16) is this design's choice.  The window is a
// packed vector of registers, so no memory is inferred.
//
// Interface: clk, load + blk, shift; w_t = W_t of the current step.
// load has priority over shift.
module sha1_w16
  import mac_pkg::*;
(
  input  logic      clk,
  input  logic      load,
  input  block512_t blk,
  input  logic      shift,
  output word_t     w_t
);
  logic [15:0][31:0] w;         // w[0] is W_t, a register window (no RAM)
  word_t w_new;

  assign w_new = w[13] ^ w[8] ^ w[2] ^ w[0];
  assign w_t   = w[0];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < 16; i++) w[i] <= blk[511-32*i -: 32];
    end else if (shift) begin
      for (int i = 0; i < 15; i++) w[i] <= w[i+1];
      w[15] <= {w_new[30:0], w_new[31]};
    end
  end
endmodule
