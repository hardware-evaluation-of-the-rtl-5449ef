// Throughput workloads on luffa_top at its default size.
//
// Runs the message shapes the throughput figures are quoted for:
//   * one-block messages (256 bits after padding) and one long message of
//     LONG_BLOCKS blocks on the high-throughput and compact cores, checking
//     9*(N+1) and 26*(N+1) cycles per message and blocks accepted every 9
//     and 26 cycles;
//   * eight independent long messages of PIPE_BLOCKS blocks each in the
//     pipelined round function, checking that after the fill all eight
//     finish within (PIPE_BLOCKS + 1) * 8 cycles, i.e. one block per cycle.
// All digests are compared with the reference model. The derived throughput
// at the clock rates reported for the synthesized designs is printed.
module tb_luffa_workloads;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  localparam int LONG_BLOCKS = 64;
  localparam int PIPE_BLOCKS = 16;
  localparam int WD_CYCLES   = 60000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         ht_blk_valid, ht_blk_last, ht_blk_ready, ht_hash_valid;
  logic [255:0] ht_blk_data, ht_hash;
  logic         cp_blk_valid, cp_blk_last, cp_blk_ready, cp_hash_valid;
  logic [255:0] cp_blk_data, cp_hash;
  logic [2:0]   pp_in_slot, pp_out_slot;
  logic         pp_in_valid, pp_in_first, pp_out_valid;
  logic [255:0] pp_in_data, pp_out_hash;
  state_t       pp_out_state;

  luffa_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Feeds one message gap-free to core sel (0 = high-throughput, 1 = compact)
  // and returns the cycles from the first accepted block to hash_valid.
  task automatic core_msg(input int sel, input int nblk, output int lat);
    bit [255:0] q [$];
    int t0, tprev, per;
    per = (sel == 0) ? 9 : 26;
    for (int i = 0; i < nblk; i++) q.push_back(rand256());
    for (int i = 0; i < nblk; i++) begin
      @(negedge clk);
      if (sel == 0) begin
        ht_blk_valid = 1; ht_blk_last = (i == nblk - 1); ht_blk_data = q[i];
      end else begin
        cp_blk_valid = 1; cp_blk_last = (i == nblk - 1); cp_blk_data = q[i];
      end
      @(posedge clk);
      while (!((sel == 0) ? ht_blk_ready : cp_blk_ready)) @(posedge clk);
      if (i == 0) t0 = cyc;
      else check(cyc - tprev == per, $sformatf("core %0d: block interval %0d", sel, cyc - tprev));
      tprev = cyc;
      @(negedge clk);
      if (sel == 0) ht_blk_valid = 0; else cp_blk_valid = 0;
    end
    @(posedge clk);
    while (!((sel == 0) ? ht_hash_valid : cp_hash_valid)) @(posedge clk);
    lat = cyc - t0 + ((sel == 0) ? 0 : 1);
    check(((sel == 0) ? ht_hash : cp_hash) == ref_hash(q),
          $sformatf("core %0d: digest of %0d-block message", sel, nblk));
    check(lat == per * (nblk + 1), $sformatf("core %0d: %0d cycles for %0d blocks", sel, lat, nblk));
  endtask

  task automatic run_core(input int sel, input real mhz);
    int lat1, latl;
    core_msg(sel, 1, lat1);
    core_msg(sel, LONG_BLOCKS, latl);
    $display("%s core: one-block %0d cycles -> %0.1f Mbps, %0d-block message %0d cycles -> %0.1f Mbps at %0.0f MHz",
             (sel == 0) ? "high-throughput" : "compact", lat1, 256.0 * mhz / lat1,
             LONG_BLOCKS, latl, 256.0 * mhz * LONG_BLOCKS / latl, mhz);
  endtask

  task automatic run_pipe();
    bit [255:0] msgs [8][$];
    int nxt [8], t0, t1, done = 0;
    bit blank [8];
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < PIPE_BLOCKS; i++) msgs[s].push_back(rand256());
      nxt[s] = 0; blank[s] = 0;
    end
    // Align so that slot 0 enters first.
    @(negedge clk);
    while (pp_in_slot != 3'd0) @(negedge clk);
    t0 = cyc;
    while (done < 8) begin
      int s;
      s = int'(pp_in_slot);
      pp_in_valid = 0; pp_in_first = 0; pp_in_data = '0;
      if (blank[s] && nxt[s] >= 0) begin
        check(pp_out_valid && pp_out_hash == ref_hash(msgs[s]), $sformatf("pipeline digest slot %0d", s));
        nxt[s] = -1;
        done++;
      end else if (nxt[s] >= 0) begin
        pp_in_valid = 1;
        if (nxt[s] < PIPE_BLOCKS) begin
          pp_in_first = (nxt[s] == 0);
          pp_in_data  = msgs[s][nxt[s]++];
        end else blank[s] = 1;
      end
      @(negedge clk);
    end
    t1 = cyc;
    check(t1 - t0 == (PIPE_BLOCKS + 2) * 8,
          $sformatf("pipeline: %0d cycles for 8 x %0d blocks", t1 - t0, PIPE_BLOCKS));
    $display("pipelined: 8 x %0d blocks in %0d cycles -> %0.1f Mbps at 508 MHz",
             PIPE_BLOCKS, t1 - t0, 256.0 * 508.0 * 8 * PIPE_BLOCKS / (t1 - t0));
  endtask

  initial begin
    rst_n = 0;
    ht_blk_valid = 0; ht_blk_last = 0; ht_blk_data = '0;
    cp_blk_valid = 0; cp_blk_last = 0; cp_blk_data = '0;
    pp_in_valid = 0; pp_in_first = 0; pp_in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      run_core(0, 1124.0);
      run_core(1, 250.0);
      run_pipe();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
