// Random check of the output function (XOR of the three chunks).
module tb_luffa_of;
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
  state_t       h;
  logic [255:0] z;
  luffa_of dut (.*);
  initial begin
    for (int i = 0; i < 100; i++) begin
      st_t hr;
      for (int jj = 0; jj < 3; jj++) begin
        h[jj]  = chunk_t'(rand256());
        hr[jj] = from_bits(256'(h[jj]));
      end
      #1;
      check(z == ref_out(hr), $sformatf("OF test %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
