// Luffa-224/256 hardware: the three proposed architectures side by side.
//
//   ht_*   high-throughput core (luffa_ht): retimed, 9 cycles per round
//   cp_*   compact core (luffa_compact): one shared step block, 26 cycles
//          per round
//   pp_*   pipelined round function (luffa_pipe): 8 stages, 8 interleaved
//          independent messages, one block per cycle
//
// All three compute the same Luffa-224/256 compression and share clock and
// reset; each keeps its own ports. Message blocks are 256 bits, already
// padded; see the cores for handshake and timing.
module luffa_top
  import luffa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // high-throughput core
  input  logic         ht_blk_valid,
  input  logic         ht_blk_last,
  input  logic [255:0] ht_blk_data,
  output logic         ht_blk_ready,
  output logic         ht_hash_valid,
  output logic [255:0] ht_hash,
  // compact core
  input  logic         cp_blk_valid,
  input  logic         cp_blk_last,
  input  logic [255:0] cp_blk_data,
  output logic         cp_blk_ready,
  output logic         cp_hash_valid,
  output logic [255:0] cp_hash,
  // pipelined round function
  output logic [2:0]   pp_in_slot,
  input  logic         pp_in_valid,
  input  logic         pp_in_first,
  input  logic [255:0] pp_in_data,
  output logic         pp_out_valid,
  output logic [2:0]   pp_out_slot,
  output state_t       pp_out_state,
  output logic [255:0] pp_out_hash
);
  luffa_ht u_ht (
    .clk, .rst_n,
    .blk_valid(ht_blk_valid), .blk_last(ht_blk_last), .blk_data(ht_blk_data),
    .blk_ready(ht_blk_ready), .hash_valid(ht_hash_valid), .hash(ht_hash)
  );

  luffa_compact u_cp (
    .clk, .rst_n,
    .blk_valid(cp_blk_valid), .blk_last(cp_blk_last), .blk_data(cp_blk_data),
    .blk_ready(cp_blk_ready), .hash_valid(cp_hash_valid), .hash(cp_hash)
  );

  luffa_pipe u_pp (
    .clk, .rst_n,
    .in_slot(pp_in_slot), .in_valid(pp_in_valid), .in_first(pp_in_first),
    .in_data(pp_in_data),
    .out_valid(pp_out_valid), .out_slot(pp_out_slot),
    .out_state(pp_out_state), .out_hash(pp_out_hash)
  );
endmodule
