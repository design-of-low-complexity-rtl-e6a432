// tb_fft_core: self-checking test of the streaming FFT core.
//
// Two sizes are built from the same source: the default 4-point core, whose
// result must equal the exact DFT (rotation factors 1 and -j are exact), and
// a 16-point core, which exercises the on-line rotation-factor generator and
// must stay within a few LSB of the DFT. See fft_core_harness for what is
// checked per bin.
module tb_fft_core;
  logic clk = 0;
  always #5 clk = ~clk;

  int c4, f4, c16, f16;
  logic d4, d16;

  fft_core_harness #(.LOG2N(2), .TOL(0), .FRAMES(60)) h4  (.clk, .checks(c4),  .failures(f4),  .done(d4));
  fft_core_harness #(.LOG2N(4), .TOL(6), .FRAMES(40)) h16 (.clk, .checks(c16), .failures(f16), .done(d16));

  initial begin
    wait (d4 && d16);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16 + 1);
    $finish;
  end
endmodule
