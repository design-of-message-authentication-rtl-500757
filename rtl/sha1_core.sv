// sha1_core: SHA-1 compression of one 512-bit block, one step per clock.
//
// The start edge loads A..E from the chaining value cv_in (CVq) and the block
// into the sixteen-word message schedule.  The next 80 edges run steps
// t = 0..79: TEMP = S^5(A) + f_t(B,C,D) + E + W_t + K_t; E = D; D = C;
// C = S^30(B); B = A; A = TEMP.  The edge after step 79 adds A..E to the
// chaining value (five 32-bit adders) and puts CV(q+1) on cv_out with done
// high for one cycle: done is high 82 cycles after the cycle in which start
// was high.  Longer messages are hashed by feeding cv_out back as cv_in with
// the next block.  The step function, the four 20-step stages and the final
// additions follow the published architecture; the one-step-per-clock
// schedule and the start/done handshake are this design's choices.
//
// Interface: clk, rst (synchronous, active high), start (accepted when
// busy = 0), blk (512-bit block Yq), cv_in (160 bits, H0 in 159:128);
// cv_out, done, busy.
module sha1_core
  import mac_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  block512_t blk,
  input  digest_t   cv_in,
  output digest_t   cv_out,
  output logic      done,
  output logic      busy
);
  typedef enum logic [1:0] {S_IDLE, S_STEP, S_ADD} state_e;

  state_e     st_q;
  logic [6:0] t_q;
  word_t      a, b, c, d, e;
  word_t      temp, w_t;
  digest_t    cv_q;

  sha1_w16 u_sched (
    .clk, .load(st_q == S_IDLE && start), .blk, .shift(st_q == S_STEP), .w_t
  );

  assign temp = {a[26:0], a[31:27]} + sha1_f(t_q, b, c, d) + e + w_t + sha1_k(t_q);
  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q   <= S_IDLE;
      t_q    <= '0;
      {a, b, c, d, e} <= '0;
      cv_q   <= '0;
      cv_out <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          cv_q            <= cv_in;
          {a, b, c, d, e} <= cv_in;
          t_q             <= '0;
          st_q            <= S_STEP;
        end
        S_STEP: begin
          e   <= d;
          d   <= c;
          c   <= {b[1:0], b[31:2]};
          b   <= a;
          a   <= temp;
          t_q <= t_q + 7'd1;
          if (t_q == 7'd79) st_q <= S_ADD;
        end
        S_ADD: begin
          cv_out <= {cv_q[159:128] + a, cv_q[127:96] + b, cv_q[95:64] + c,
                     cv_q[63:32] + d, cv_q[31:0] + e};
          done   <= 1'b1;
          st_q   <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
