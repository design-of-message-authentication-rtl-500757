// aes_core: iterative AES-128 encryption and decryption, one round per clock.
//
// Encryption: the start edge loads state = din ^ key (initial round-key
// addition, round key 0) and the key schedule; rounds 1..10 follow on the next
// ten edges, each with its round key formed on the fly, round 10 without
// MixColumn.  done is high for one cycle, with dout valid, 11 cycles after
// the cycle in which start was high.
// Decryption: the key schedule first runs forward ten steps to reach round
// key 10 (the last of those edges also adds it to the state), then ten
// inverse rounds use round keys 9..0 taken backwards from the schedule.
// done follows 21 cycles after the start cycle.
// The round structure (initial key addition, Nr-1 full rounds, a final round
// without MixColumn, Nr = 10 for a 128-bit key) follows the standard; the
// iterative one-round-per-clock organisation, the latencies and the
// start/done handshake are this design's choices.
//
// Interface: clk, rst (synchronous, active high), start (one cycle, accepted
// only when busy = 0), dec (0 encrypt, 1 decrypt, sampled with start), din,
// key (sampled with start); dout holds the last result, done pulses once.
module aes_core
  import mac_pkg::*;
#(
  parameter int unsigned NR = 10   // rounds for a 128-bit key
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      dec,
  input  block128_t din,
  input  block128_t key,
  output block128_t dout,
  output logic      done,
  output logic      busy
);
  typedef enum logic [1:0] {S_IDLE, S_KEYS, S_ROUND} state_e;

  state_e     st_q;
  logic       dec_q;
  logic [3:0] cnt_q;
  block128_t  state_q, round_out;
  block128_t  rk_q, rk_d;
  logic [3:0] rnd_q;
  logic       ke_load, ke_fwd, ke_rev, last;

  assign last     = (cnt_q == 4'(NR - 1));
  assign ke_load  = (st_q == S_IDLE) && start;
  assign ke_fwd   = (st_q == S_KEYS) || (st_q == S_ROUND && !dec_q);
  assign ke_rev   = (st_q == S_ROUND) && dec_q;

  aes_key_expand u_keys (
    .clk, .rst,
    .load(ke_load), .key, .step_fwd(ke_fwd), .step_rev(ke_rev),
    .rk_q, .rk_d, .rnd_q
  );

  aes_round u_round (
    .state_in(state_q), .rk(rk_d), .dec(dec_q), .final_rnd(last),
    .state_out(round_out)
  );

  assign dout = state_q;
  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q    <= S_IDLE;
      dec_q   <= 1'b0;
      cnt_q   <= '0;
      state_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          dec_q   <= dec;
          cnt_q   <= '0;
          state_q <= dec ? din : din ^ key;
          st_q    <= dec ? S_KEYS : S_ROUND;
        end
        S_KEYS: begin
          cnt_q <= cnt_q + 4'd1;
          if (last) begin
            state_q <= state_q ^ rk_d;    // round key Nr
            cnt_q   <= '0;
            st_q    <= S_ROUND;
          end
        end
        S_ROUND: begin
          state_q <= round_out;
          cnt_q   <= cnt_q + 4'd1;
          if (last) begin
            st_q <= S_IDLE;
            done <= 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
