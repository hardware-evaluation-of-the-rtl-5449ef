// Exhaustive check of the 4-bit S-box against the reference table, plus a bijectivity check.
module tb_luffa_sbox;
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
  logic [3:0] x, y;
  luffa_sbox dut (.x(x), .y(y));
  initial begin
    bit [15:0] seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      check(y == REF_SBOX[i], $sformatf("sbox[%0d] = %0d, expected %0d", i, y, REF_SBOX[i]));
      seen[y] = 1'b1;
    end
    check(&seen, "S-box is not a permutation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
