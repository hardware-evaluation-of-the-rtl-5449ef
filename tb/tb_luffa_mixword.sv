// Random check of MixWord against the reference model, including single-bit inputs.
module tb_luffa_mixword;
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
  word_t xl, xr, yl, yr;
  luffa_mixword dut (.*);
  initial begin
    for (int i = 0; i < 600; i++) begin
      w32_t u, v;
      if (i < 64) begin
        xl = (i < 32) ? (32'h1 << i) : '0;
        xr = (i < 32) ? '0 : (32'h1 << (i - 32));
      end else begin
        xl = $urandom; xr = $urandom;
      end
      u = xl; v = xr;
      mix_word(u, v);
      #1;
      check(yl == u && yr == v,
            $sformatf("in %h %h: got %h %h exp %h %h", xl, xr, yl, yr, u, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
