// Compact Luffa-224/256 core: one step-function block for all three
// sub-permutations.
//
// The state is kept in w = 3 registers of 256 bits. Each has a 3-to-1 input
// multiplexer, as in the compact architecture: the initial value IV, the
// output of the shared step block, or the message-injection result (used for
// message blocks and for the blank round alike). A chunk-select multiplexer
// feeds the single step block (64 S-boxes, 4 MixWord blocks); the step
// result is written back only into the selected register, and the other
// registers hold (a write enable here stands for the clock gating of the
// original design).
//
// Schedule of one round, 26 cycles as in the reported cycle count:
//   1 cycle   MI on all three chunks (with the per-chunk tweak)
//   24 cycles step r = 0..7 on Q_0, then on Q_1, then on Q_2
//   1 cycle   end of round: digest output or blank-round decision
// The split into 1 + 24 + 1 is this implementation's reading of the count.
//
// Interface: as luffa_ht. A block is taken when blk_valid && blk_ready;
// blk_last marks the final block. After the blank round hash_valid is high
// for the single end-of-round cycle with hash = h0 ^ h1 ^ h2, and at the same
// clock edge the registers reload IV. A message of N blocks takes 26*(N+1)
// cycles from the accepted first block to the end of the hash_valid cycle.
module luffa_compact
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
  typedef enum logic [1:0] {S_INJECT, S_STEP, S_END} ctrl_t;
  typedef enum logic [1:0] {SEL_HOLD, SEL_INIT, SEL_PERM, SEL_MI} regsel_t;

  ctrl_t      ctrl_q;
  step_idx_t  r_q;
  chunk_idx_t j_q;
  state_t     st_q, mi_out, mi_tw;
  chunk_t     msg, step_in, step_out;
  word_t      c0, c4;
  logic       last_q, blank_q, blank_pend_q, inject;
  regsel_t    sel [W];

  assign blk_ready  = (ctrl_q == S_INJECT) && !blank_pend_q;
  assign inject     = (ctrl_q == S_INJECT) && (blank_pend_q || blk_valid);
  assign hash_valid = (ctrl_q == S_END) && blank_q;

  always_comb msg = blank_pend_q ? chunk_t'('0) : chunk_t'(blk_data);

  luffa_mi u_mi (.h(st_q), .m(msg), .y(mi_out));
  always_comb mi_tw = tweak_all(mi_out);

  always_comb begin
    step_in = st_q[0];
    if (j_q == 2'd1) step_in = st_q[1];
    if (j_q == 2'd2) step_in = st_q[2];
  end

  luffa_rc   u_rc   (.j(j_q), .r(r_q), .c0(c0), .c4(c4));
  luffa_step u_step (.a(step_in), .c0(c0), .c4(c4), .y(step_out));

  always_comb begin
    for (int j = 0; j < W; j++) begin
      sel[j] = SEL_HOLD;
      if (inject)                                          sel[j] = SEL_MI;
      else if (ctrl_q == S_STEP && j_q == chunk_idx_t'(j)) sel[j] = SEL_PERM;
      else if (hash_valid)                                 sel[j] = SEL_INIT;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= IV;
    end else begin
      for (int j = 0; j < W; j++) begin
        case (sel[j])
          SEL_INIT: st_q[j] <= IV[j];
          SEL_PERM: st_q[j] <= step_out;
          SEL_MI:   st_q[j] <= mi_tw[j];
          default:  ;  // hold (clock gated)
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q       <= S_INJECT;
      r_q          <= '0;
      j_q          <= '0;
      last_q       <= 1'b0;
      blank_q      <= 1'b0;
      blank_pend_q <= 1'b0;
    end else begin
      case (ctrl_q)
        S_INJECT: begin
          if (inject) begin
            ctrl_q       <= S_STEP;
            r_q          <= '0;
            j_q          <= '0;
            blank_q      <= blank_pend_q;
            last_q       <= blank_pend_q ? 1'b0 : blk_last;
            blank_pend_q <= 1'b0;
          end
        end
        S_STEP: begin
          r_q <= r_q + 1'b1;
          if (r_q == step_idx_t'(STEPS - 1)) begin
            if (j_q == chunk_idx_t'(W - 1)) ctrl_q <= S_END;
            else                            j_q    <= j_q + 1'b1;
          end
        end
        S_END: begin
          ctrl_q  <= S_INJECT;
          j_q     <= '0;
          blank_q <= 1'b0;
          if (!blank_q && last_q) blank_pend_q <= 1'b1;
        end
        default: ctrl_q <= S_INJECT;
      endcase
    end
  end

  luffa_of u_of (.h(st_q), .z(hash));

  assert property (@(posedge clk) disable iff (!rst_n) blank_pend_q |-> !blk_ready);
endmodule
