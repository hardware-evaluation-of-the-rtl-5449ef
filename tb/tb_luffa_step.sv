// Random check of the step function (SubCrumb, MixWord, AddConstant) against the reference model.
module tb_luffa_step;
  import luffa_pkg::*;
  import luffa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

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
  localparam int WD_CYCLES = 10000;
  chunk_t a, y;
  word_t  c0, c4;
  luffa_step dut (.*);
  initial begin
    for (int i = 0; i < 400; i++) begin
      blk_t e;
      a  = chunk_t'(rand256());
      c0 = (i % 4 == 0) ? '0 : $urandom;
      c4 = (i % 4 == 1) ? '0 : $urandom;
      e  = ref_step(from_bits(256'(a)), c0, c4);
      #1;
      check(256'(y) == to_bits(e), $sformatf("step mismatch for input %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
