// Self-checking testbench of the pipelined round function.
//
// Keeps eight independent messages in flight, one per slot. Whenever a slot
// comes round (in_slot), the testbench checks what leaves the pipeline for
// that slot and feeds the slot's next input: the next message block (with
// in_first on the first one), then the all-zero blank-round block, and on the
// following turn it compares out_hash with the reference digest and starts a
// new message in the slot. Checks that every slot's result returns exactly
// 8 cycles after it entered, that out_valid is low for idle slots, and that
// with all slots busy one block enters per cycle.
module tb_luffa_pipe;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  localparam int N_MSGS    = 40;
  localparam int WD_CYCLES = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, in_first, out_valid;
  logic [2:0]   in_slot, out_slot;
  logic [255:0] in_data, out_hash;
  state_t       out_state;

  luffa_pipe dut (.*);

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

  typedef struct {
    bit         busy;
    bit [255:0] blocks [$];
    int         next;          // next block to feed; == size means blank round
    bit         blank_sent;
    bit         in_flight;     // something entered on this slot's last turn
  } ctx_t;

  ctx_t ctx [8];
  int   started = 0, finished = 0, busy_cycles = 0, run = 0, max_run = 0;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (finished < N_MSGS) begin
      int s;
      @(negedge clk);
      s = int'(in_slot);
      check(out_slot == in_slot, "out_slot differs from in_slot");
      check(out_valid == ctx[s].in_flight,
            $sformatf("slot %0d: out_valid %0b, expected %0b", s, out_valid, ctx[s].in_flight));
      if (ctx[s].busy && ctx[s].blank_sent) begin
        check(out_hash == ref_hash(ctx[s].blocks),
              $sformatf("slot %0d digest %h exp %h", s, out_hash, ref_hash(ctx[s].blocks)));
        ctx[s].busy = 0;
        finished++;
      end
      // Start a new message; slot 5 skips some turns to leave bubbles.
      if (!ctx[s].busy && started < N_MSGS && !(s == 5 && $urandom_range(0, 1) == 0)) begin
        int n;
        n = $urandom_range(1, 3);
        ctx[s].blocks.delete();
        for (int i = 0; i < n; i++) ctx[s].blocks.push_back(rand256());
        ctx[s].busy = 1; ctx[s].next = 0; ctx[s].blank_sent = 0;
        started++;
      end
      in_valid = 1'b0; in_first = 1'b0; in_data = rand256();
      if (ctx[s].busy) begin
        in_valid = 1'b1;
        if (ctx[s].next < ctx[s].blocks.size()) begin
          in_first = (ctx[s].next == 0);
          in_data  = ctx[s].blocks[ctx[s].next];
          ctx[s].next++;
        end else begin
          in_data = '0;
          ctx[s].blank_sent = 1;
        end
      end
      ctx[s].in_flight = in_valid;
      if (in_valid) begin busy_cycles++; run++; end else run = 0;
      if (run > max_run) max_run = run;
    end
    // Over the run most cycles carried a block: the pipeline accepts one per cycle.
    check(busy_cycles > N_MSGS * 2, $sformatf("only %0d blocks entered", busy_cycles));
    check(max_run >= 16, $sformatf("longest run of back-to-back blocks only %0d", max_run));
    $display("blocks entered: %0d, messages: %0d, longest block run: %0d", busy_cycles, finished, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
