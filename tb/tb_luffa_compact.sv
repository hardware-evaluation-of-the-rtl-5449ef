// Self-checking testbench of the compact core.
//
// Hashes messages of 1 to 4 random blocks, with blocks offered as soon as
// the core is ready and, for some messages, after random gaps. Each digest is
// compared with the reference model. For gap-free messages the latency from
// the first accepted block to the cycle that shows hash_valid is checked
// against 26 cycles per round (N message rounds plus the blank round). Also
// checks that blk_ready stays low while the blank round runs and that a new
// message restarts from the initial value right after a digest.
module tb_luffa_compact;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  localparam int CYC_PER_ROUND = 26;
  localparam int VALID_OFFSET  = 1;   // hash_valid is the last cycle of the round
  localparam int WD_CYCLES     = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, blk_valid, blk_last, blk_ready, hash_valid;
  logic [255:0] blk_data, hash;
  int           cyc = 0;

  luffa_compact dut (.*);

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

  // Counts blk_ready cycles seen while the core finishes a message.
  task automatic hash_msg(input int nblk, input bit gaps);
    bit [255:0] q [$];
    int t0, t1;
    bit ready_in_blank = 0;
    for (int i = 0; i < nblk; i++) q.push_back(rand256());
    for (int i = 0; i < nblk; i++) begin
      if (gaps) repeat ($urandom_range(0, 12)) @(negedge clk);
      @(negedge clk);
      blk_valid = 1'b1;
      blk_last  = (i == nblk - 1);
      blk_data  = q[i];
      @(posedge clk);
      while (!blk_ready) @(posedge clk);
      if (i == 0) t0 = cyc;
      @(negedge clk);
      blk_valid = 1'b0;
      blk_data  = rand256();   // must not matter any more
    end
    @(posedge clk);
    while (!hash_valid) begin
      if (blk_ready) ready_in_blank = 1;
      @(posedge clk);
    end
    t1 = cyc;
    check(hash == ref_hash(q), $sformatf("digest of %0d-block message: %h exp %h",
                                         nblk, hash, ref_hash(q)));
    check(!ready_in_blank, "blk_ready high before the digest was produced");
    if (!gaps)
      check(t1 - t0 == CYC_PER_ROUND * (nblk + 1) - VALID_OFFSET,
            $sformatf("latency %0d for %0d blocks, expected %0d", t1 - t0, nblk,
                      CYC_PER_ROUND * (nblk + 1) - VALID_OFFSET));
  endtask

  initial begin
    rst_n = 1'b0; blk_valid = 1'b0; blk_last = 1'b0; blk_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    hash_msg(1, 0);
    hash_msg(1, 0);
    hash_msg(2, 0);
    hash_msg(3, 0);
    hash_msg(4, 1);
    hash_msg(1, 1);
    hash_msg(2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
