// Random check of the w = 3 message injection against the reference model.
module tb_luffa_mi;
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
  state_t h, y;
  chunk_t m;
  luffa_mi dut (.*);
  initial begin
    for (int i = 0; i < 300; i++) begin
      st_t hr, e;
      for (int jj = 0; jj < 3; jj++) h[jj] = chunk_t'(rand256());
      m = chunk_t'(rand256());
      if (i == 0) m = '0;
      if (i == 1) h = '0;
      for (int jj = 0; jj < 3; jj++) hr[jj] = from_bits(256'(h[jj]));
      e = ref_mi(hr, from_bits(256'(m)));
      #1;
      for (int jj = 0; jj < 3; jj++)
        check(256'(y[jj]) == to_bits(e[jj]), $sformatf("MI chunk %0d, test %0d", jj, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
