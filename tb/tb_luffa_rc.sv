// Checks every (j, r) entry of the step-constant table, spot values and the zero output for j = 3.
module tb_luffa_rc;
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
  localparam int WD_CYCLES = 1000;
  chunk_idx_t j;
  step_idx_t  r;
  word_t      c0, c4;
  luffa_rc dut (.*);
  initial begin
    for (int jj = 0; jj < 4; jj++) begin
      for (int rr = 0; rr < 8; rr++) begin
        j = chunk_idx_t'(jj); r = step_idx_t'(rr);
        #1;
        if (jj < 3)
          check(c0 == RC0[jj][rr] && c4 == RC4[jj][rr], $sformatf("rc j=%0d r=%0d", jj, rr));
        else
          check(c0 == 0 && c4 == 0, $sformatf("rc j=3 r=%0d not zero", rr));
      end
    end
    // Spot values of the table (first and last constants of Q_0 and Q_2).
    j = 0; r = 0; #1; check(c0 == 32'h303994a6 && c4 == 32'he0337818, "rc Q0 step0");
    j = 0; r = 7; #1; check(c0 == 32'h96e1db12 && c4 == 32'h9a226e9d, "rc Q0 step7");
    j = 2; r = 7; #1; check(c0 == 32'ha2c78434 && c4 == 32'h703aace7, "rc Q2 step7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
