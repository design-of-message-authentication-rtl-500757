// aes_key_expand: AES-128 key schedule producing one round key per clock,
// forwards (round i -> i+1) or backwards (round i -> i-1).
//
// The register rk_q holds the round key of round rnd_q (0..10).  load copies
// the cipher key in as round key 0.  step_fwd replaces it with the next round
// key, step_rev with the previous one (the schedule run in reverse, which lets
// decryption use the keys Nr..0 after one forward pass).  rk_d is the value
// rk_q takes at the next edge, so a round can use its key in the cycle the
// key is formed.  Four forward S-box units serve SubWord in both directions.
// The key schedule itself is the standard one; computing keys on the fly
// rather than storing all eleven is this design's choice, in line with the
// published architecture's use of no memory bits.
//
// Interface: clk, rst (synchronous, active high), load + key, step_fwd,
// step_rev; outputs rk_q, rk_d, rnd_q.  load has priority over the steps.
module aes_key_expand
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  block128_t  key,
  input  logic       step_fwd,
  input  logic       step_rev,
  output block128_t  rk_q,
  output block128_t  rk_d,
  output logic [3:0] rnd_q
);
  word_t w0, w1, w2, w3;        // words of the current key
  word_t p3;                    // last word of the previous key
  word_t sw_in, rot, sub;
  word_t n0, n1, n2, n3, q0;
  logic [3:0] rnd_d;

  assign {w0, w1, w2, w3} = rk_q;
  assign p3    = w3 ^ w2;
  assign sw_in = step_rev ? p3 : w3;
  assign rot   = {sw_in[23:0], sw_in[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox u_sbox (.x(rot[8*i +: 8]), .dec(1'b0), .y(sub[8*i +: 8]));
  end

  always_comb begin
    // forward: key of round rnd_q+1
    n0 = w0 ^ sub ^ {aes_rcon(rnd_q + 4'd1), 24'h0};
    n1 = n0 ^ w1;
    n2 = n1 ^ w2;
    n3 = n2 ^ w3;
    // backward: first word of key of round rnd_q-1
    q0 = w0 ^ sub ^ {aes_rcon(rnd_q), 24'h0};
    rk_d  = rk_q;
    rnd_d = rnd_q;
    if (load) begin
      rk_d  = key;
      rnd_d = '0;
    end else if (step_fwd) begin
      rk_d  = {n0, n1, n2, n3};
      rnd_d = rnd_q + 4'd1;
    end else if (step_rev) begin
      rk_d  = {q0, w1 ^ w0, w2 ^ w1, p3};
      rnd_d = rnd_q - 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rk_q  <= '0;
      rnd_q <= '0;
    end else begin
      rk_q  <= rk_d;
      rnd_q <= rnd_d;
    end
  end

  // Round numbers stay within 0..10.
  a_fwd_range: assert property (@(posedge clk) disable iff (rst)
    step_fwd && !load |-> rnd_q < 4'd10);
  a_rev_range: assert property (@(posedge clk) disable iff (rst)
    step_rev && !load && !step_fwd |-> rnd_q > 4'd0);
endmodule
