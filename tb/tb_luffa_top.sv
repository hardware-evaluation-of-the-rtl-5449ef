// End-to-end testbench of luffa_top at its default (and only) size.
//
// The same list of padded messages (1 to 4 blocks) is hashed by all three
// architectures at once: the high-throughput and the compact core take the
// messages one after the other, the pipelined round function takes them
// eight at a time, one per slot. Every digest is compared with the reference
// model and across the three architectures, and the per-message latency of
// the two iterative cores is checked (9 and 26 cycles per round). Counts how
// often each mechanism happened and fails if one never did: multi-block
// chaining, the automatic blank round, a restart from IV right after a
// digest, a producer stall (core ready, no block offered), blk_ready held low
// during the blank round, eight messages in flight in the pipeline, and an
// idle pipeline slot.
module tb_luffa_top;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  localparam int N_MSGS    = 12;
  localparam int WD_CYCLES = 40000;

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

  typedef bit [255:0] blist_t [$];
  blist_t     msgs [N_MSGS];
  bit [255:0] expd [N_MSGS];
  bit [255:0] got_ht [N_MSGS], got_cp [N_MSGS], got_pp [N_MSGS];

  // mechanism counters
  int n_multiblock = 0, n_blank = 0, n_iv_restart = 0, n_stall = 0;
  int n_ready_low_blank = 0, n_pipe_full = 0, n_pipe_idle = 0;

  // Drives one iterative core (sel 0 = high-throughput, 1 = compact).
  task automatic run_core(input int sel);
    int per_round = (sel == 0) ? 9 : 26;
    int offset    = (sel == 0) ? 0 : 1;
    for (int m = 0; m < N_MSGS; m++) begin
      int t0, t1;
      bit gaps = (m % 3 == 2);
      bit rdy_low = 0;
      for (int i = 0; i < msgs[m].size(); i++) begin
        if (gaps) begin
          int d = $urandom_range(1, 6);
          repeat (d) @(negedge clk);
          if (sel == 0) n_stall++;
        end
        @(negedge clk);
        if (sel == 0) begin
          ht_blk_valid = 1; ht_blk_last = (i == msgs[m].size() - 1); ht_blk_data = msgs[m][i];
        end else begin
          cp_blk_valid = 1; cp_blk_last = (i == msgs[m].size() - 1); cp_blk_data = msgs[m][i];
        end
        @(posedge clk);
        while (!((sel == 0) ? ht_blk_ready : cp_blk_ready)) @(posedge clk);
        if (i == 0) t0 = cyc;
        @(negedge clk);
        if (sel == 0) ht_blk_valid = 0; else cp_blk_valid = 0;
      end
      @(posedge clk);
      while (!((sel == 0) ? ht_hash_valid : cp_hash_valid)) begin
        if (!((sel == 0) ? ht_blk_ready : cp_blk_ready)) rdy_low = 1;
        @(posedge clk);
      end
      t1 = cyc;
      if (sel == 0) got_ht[m] = ht_hash; else got_cp[m] = cp_hash;
      if (sel == 0) begin
        n_blank++;
        if (rdy_low) n_ready_low_blank++;
        if (msgs[m].size() > 1) n_multiblock++;
        if (m > 0) n_iv_restart++;
      end
      if (!gaps)
        check(t1 - t0 == per_round * (msgs[m].size() + 1) - offset,
              $sformatf("core %0d message %0d: latency %0d", sel, m, t1 - t0));
    end
  endtask

  // Drives the pipeline: each slot takes the next unstarted message.
  task automatic run_pipe();
    int owner [8], nxt [8], started = 0, done = 0;
    bit blank [8], busy [8];
    for (int s = 0; s < 8; s++) busy[s] = 0;
    while (done < N_MSGS) begin
      int s, inflight = 0;
      @(negedge clk);
      s = int'(pp_in_slot);
      if (busy[s] && blank[s]) begin
        check(pp_out_valid, "pipeline result missing");
        got_pp[owner[s]] = pp_out_hash;
        busy[s] = 0;
        done++;
      end
      if (!busy[s] && started < N_MSGS && s != 7) begin
        owner[s] = started++; nxt[s] = 0; blank[s] = 0; busy[s] = 1;
      end
      pp_in_valid = busy[s]; pp_in_first = 0; pp_in_data = '0;
      if (busy[s]) begin
        if (nxt[s] < msgs[owner[s]].size()) begin
          pp_in_first = (nxt[s] == 0);
          pp_in_data  = msgs[owner[s]][nxt[s]++];
        end else blank[s] = 1;
      end else n_pipe_idle++;
      for (int k = 0; k < 8; k++) inflight += busy[k];
      if (inflight == 7 && !busy[7]) n_pipe_full++;
    end
    @(negedge clk) pp_in_valid = 0;
  endtask

  initial begin
    rst_n = 0;
    ht_blk_valid = 0; ht_blk_last = 0; ht_blk_data = '0;
    cp_blk_valid = 0; cp_blk_last = 0; cp_blk_data = '0;
    pp_in_valid = 0; pp_in_first = 0; pp_in_data = '0;
    for (int m = 0; m < N_MSGS; m++) begin
      int n;
      n = 1 + (m % 4);
      for (int i = 0; i < n; i++) msgs[m].push_back(rand256());
      expd[m] = ref_hash(msgs[m]);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      run_core(0);
      run_core(1);
      run_pipe();
    join
    for (int m = 0; m < N_MSGS; m++) begin
      check(got_ht[m] == expd[m], $sformatf("high-throughput digest %0d", m));
      check(got_cp[m] == expd[m], $sformatf("compact digest %0d", m));
      check(got_pp[m] == expd[m], $sformatf("pipelined digest %0d", m));
    end
    $display("multi-block messages %0d, blank rounds %0d, IV restarts %0d, stalls %0d",
             n_multiblock, n_blank, n_iv_restart, n_stall);
    $display("ready low in blank round %0d, pipeline full %0d, idle slot turns %0d",
             n_ready_low_blank, n_pipe_full, n_pipe_idle);
    check(n_multiblock > 0, "no multi-block message");
    check(n_blank > 0, "no blank round");
    check(n_iv_restart > 0, "no restart from IV");
    check(n_stall > 0, "no producer stall");
    check(n_ready_low_blank > 0, "blk_ready never low in a blank round");
    check(n_pipe_full > 0, "pipeline never had all working slots busy");
    check(n_pipe_idle > 0, "no idle pipeline slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
