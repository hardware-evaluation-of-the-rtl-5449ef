// Pipelined Luffa-224/256 round function for independent messages.
//
// The eight steps of a round are unrolled: stage r (r = 0..7) holds a
// 3 x 256-bit register followed by the three step blocks of step r (one per
// sub-permutation), 8*w step blocks and 8*w pipeline registers in all, as in
// the pipelined architecture. The message injection (with the per-chunk
// tweak) sits in front of the stage-0 register. A round takes 8 cycles, so
// eight independent messages, called slots 0..7, are interleaved and one new
// block enters every cycle.
//
// Interface: in_slot tells which slot enters this cycle (it counts 0..7 and
// wraps). In the same cycle the state of that slot's previous round leaves
// stage 7 on out_state, with out_valid and out_slot, and out_hash = Z_0 of
// it. The caller offers the slot's next block with in_valid. in_first = 1
// chains from IV (first block of a new message); otherwise the block chains
// from the state just leaving stage 7. The blank round of the finalization is
// an ordinary round with in_data = 0, after which out_hash is the digest. A
// slot that gets no block when its turn comes is dropped from the pipeline.
// Slot scheduling, padding and finalization sequencing are left to the
// caller; this is an implementation choice, the source architecture gives
// only the pipelined datapath. Its table lists 9 cycles per round, but its
// text and figure give one register per permutation stage; this design
// follows the latter (8 stages, 8 messages in flight).
module luffa_pipe
  import luffa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  output logic [2:0]   in_slot,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic [255:0] in_data,
  output logic         out_valid,
  output logic [2:0]   out_slot,
  output state_t       out_state,
  output logic [255:0] out_hash
);
  logic [2:0] slot_q;
  state_t [STEPS-1:0] stage_q;
  logic   [STEPS-1:0] valid_q;
  state_t     perm_out [STEPS];
  state_t     mi_in, mi_out;

  assign in_slot = slot_q;

  always_comb mi_in = in_first ? IV : perm_out[STEPS-1];
  luffa_mi u_mi (.h(mi_in), .m(chunk_t'(in_data)), .y(mi_out));

  for (genvar r = 0; r < STEPS; r++) begin : g_stage
    for (genvar j = 0; j < W; j++) begin : g_q
      word_t c0, c4;
      luffa_rc   u_rc   (.j(chunk_idx_t'(j)), .r(step_idx_t'(r)), .c0(c0), .c4(c4));
      luffa_step u_step (.a(stage_q[r][j]), .c0(c0), .c4(c4), .y(perm_out[r][j]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      valid_q <= '0;
    end else begin
      slot_q     <= slot_q + 1'b1;
      valid_q[0] <= in_valid;
      for (int r = 1; r < STEPS; r++) valid_q[r] <= valid_q[r-1];
    end
  end

  // Datapath registers carry no reset; they are qualified by valid_q.
  always_ff @(posedge clk) begin
    stage_q[0] <= tweak_all(mi_out);
    for (int r = 1; r < STEPS; r++) stage_q[r] <= perm_out[r-1];
  end

  assign out_valid = valid_q[STEPS-1];
  assign out_slot  = slot_q;
  assign out_state = perm_out[STEPS-1];
  luffa_of u_of (.h(perm_out[STEPS-1]), .z(out_hash));

  // Chaining needs the slot's previous round to be leaving the pipeline.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && !in_first) |-> out_valid);
endmodule
