// Random check of the bit-sliced SubCrumb layer against the reference model.
module tb_luffa_subcrumb;
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
  word_t a0, a1, a2, a3, y0, y1, y2, y3;
  luffa_subcrumb dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      w32_t e0, e1, e2, e3;
      a0 = $urandom; a1 = $urandom; a2 = $urandom; a3 = $urandom;
      if (i == 0) begin a0 = '0; a1 = '0; a2 = '0; a3 = '0; end
      if (i == 1) begin a0 = '1; a1 = '1; a2 = '1; a3 = '1; end
      e0 = a0; e1 = a1; e2 = a2; e3 = a3;
      sub_crumb(e0, e1, e2, e3);
      #1;
      check({y0, y1, y2, y3} == {e0, e1, e2, e3},
            $sformatf("in %h %h %h %h: got %h %h %h %h exp %h %h %h %h",
                      a0, a1, a2, a3, y0, y1, y2, y3, e0, e1, e2, e3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
