// High-throughput Luffa-224/256 core (retimed round function).
//
// Three step-function blocks, one per sub-permutation Q_0..Q_2, work in
// parallel. Following the retimed architecture, the w = 3 state registers
// sit at the inputs of the step blocks: the register input multiplexer picks
// either the message-injection result or the step outputs. The message
// injection therefore never lies in series with a step, and a round takes
// 1 + 8 = 9 cycles: one cycle loads tweak(MI(H, M)) into the registers, then
// eight cycles apply step r = 0..7 with its constants.
//
// Interface: a 256-bit, already padded message block is taken when
// blk_valid && blk_ready; blk_last marks the final block of a message. After
// the last block the core runs the blank round (message 0) on its own and
// then raises hash_valid for one cycle. hash = Z_0 = h0 ^ h1 ^ h2 is driven
// from the registers and stays valid until the next block is taken. The first
// block of every message chains from the initial value IV.
//
// Timing: blk_ready is high in the injection state only, so a message of N
// blocks takes 9*N + 9 cycles from the first accepted block to hash_valid,
// with back-to-back blocks accepted every 9 cycles.
// The handshake, the IV selection flag and the reset behaviour are choices of
// this implementation; the datapath and the 9-cycle round follow the
// source architecture.
module luffa_ht
  import luffa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         blk_valid,
  input  logic         blk_last,
  input  logic [255:0] blk_data,
  output logic         blk_ready,
  output logic         hash_valid,
  output logic [255:0] hash
);
  typedef enum logic {S_INJECT, S_STEP} ctrl_t;

  ctrl_t     ctrl_q;
  step_idx_t r_q;
  state_t    st_q, st_d;
  state_t    mi_in, mi_out, step_out;
  chunk_t    msg;
  logic      fresh_q;          // next injection chains from IV
  logic      last_q;           // current round absorbs the final block
  logic      blank_q;          // current round is the blank round
  logic      blank_pend_q;     // blank round must follow
  logic      inject;

  assign blk_ready = (ctrl_q == S_INJECT) && !blank_pend_q;
  assign inject    = (ctrl_q == S_INJECT) && (blank_pend_q || blk_valid);

  always_comb begin
    mi_in = fresh_q ? IV : st_q;
    msg   = blank_pend_q ? chunk_t'('0) : chunk_t'(blk_data);
  end

  luffa_mi u_mi (.h(mi_in), .m(msg), .y(mi_out));

  for (genvar j = 0; j < W; j++) begin : g_q
    word_t c0, c4;
    luffa_rc   u_rc   (.j(chunk_idx_t'(j)), .r(r_q), .c0(c0), .c4(c4));
    luffa_step u_step (.a(st_q[j]), .c0(c0), .c4(c4), .y(step_out[j]));
  end

  // Register input multiplexer: injection result or permutation result.
  always_comb begin
    st_d = st_q;
    if (inject)                 st_d = tweak_all(mi_out);
    else if (ctrl_q == S_STEP)  st_d = step_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q       <= S_INJECT;
      r_q          <= '0;
      st_q         <= IV;
      fresh_q      <= 1'b1;
      last_q       <= 1'b0;
      blank_q      <= 1'b0;
      blank_pend_q <= 1'b0;
      hash_valid   <= 1'b0;
    end else begin
      st_q       <= st_d;
      hash_valid <= 1'b0;
      case (ctrl_q)
        S_INJECT: begin
          if (inject) begin
            ctrl_q       <= S_STEP;
            r_q          <= '0;
            fresh_q      <= 1'b0;
            blank_q      <= blank_pend_q;
            last_q       <= blank_pend_q ? 1'b0 : blk_last;
            blank_pend_q <= 1'b0;
          end
        end
        S_STEP: begin
          r_q <= r_q + 1'b1;
          if (r_q == step_idx_t'(STEPS - 1)) begin
            ctrl_q <= S_INJECT;
            if (blank_q) begin
              hash_valid <= 1'b1;
              fresh_q    <= 1'b1;
              blank_q    <= 1'b0;
            end else if (last_q) begin
              blank_pend_q <= 1'b1;
            end
          end
        end
        default: ctrl_q <= S_INJECT;
      endcase
    end
  end

  luffa_of u_of (.h(st_q), .z(hash));

  // A block must not be offered as taken while the blank round is pending.
  assert property (@(posedge clk) disable iff (!rst_n) blank_pend_q |-> !blk_ready);
endmodule
