// tb_sos_check: self-checking test of the sequential Parseval check.
//
// Frames are streamed as the FFT delivers them: the input frame of frame f
// overlaps the output frame of frame f-1, so the held input sum is exercised.
// Output frames are the exact DFT of their input (computed here), either left
// intact, corrupted by a random offset in one bin, or given a sign flip (an
// error that keeps the sum of squares and so must go undetected). The
// expected flag is worked out from the sums of squares in the testbench.
// chk_valid must pulse exactly one cycle after out_last of every frame.
module tb_sos_check;
  localparam int IN_W = 12, OUT_W = 14;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, out_valid = 0, out_last = 0;
  logic signed [IN_W-1:0]  in_re = 0, in_im = 0;
  logic signed [OUT_W-1:0] out_re = 0, out_im = 0;
  logic chk_valid, chk_err;

  sos_check #(.IN_W(IN_W), .OUT_W(OUT_W), .LOG2N(2), .ACC_W(39), .THRESH(0)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  int n_err = 0, n_ok = 0, n_missed = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int err; int when; } exp_t;
  exp_t expq[$];

  int xr[4], xi[4], yr[4], yi[4];        // frame being input
  int pr[4], pi_[4];                     // output frame of the previous frame
  int have_prev = 0, prev_err = 0;

  task automatic make_frame();
    for (int n = 0; n < 4; n++) begin
      xr[n] = $signed(12'($urandom));
      xi[n] = $signed(12'($urandom));
    end
    // DFT by definition
    for (int k = 0; k < 4; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < 4; n++)
        case ((n * k) % 4)
          0: begin yr[k] += xr[n]; yi[k] += xi[n]; end
          1: begin yr[k] += xi[n]; yi[k] -= xr[n]; end
          2: begin yr[k] -= xr[n]; yi[k] -= xi[n]; end
          default: begin yr[k] -= xi[n]; yi[k] += xr[n]; end
        endcase
    end
  endtask

  task automatic corrupt_and_score(output int err);
    longint sin, sout;
    int kind, k;
    kind = int'($urandom % 3);
    k = int'($urandom % 4);
    if (kind == 1) yr[k] = yr[k] + int'($urandom % 64) + 1;
    if (kind == 2) yi[k] = -yi[k];
    sin = 0; sout = 0;
    for (int n = 0; n < 4; n++) begin
      sin  += longint'(xr[n]) * xr[n] + longint'(xi[n]) * xi[n];
      sout += longint'(yr[n]) * yr[n] + longint'(yi[n]) * yi[n];
    end
    err = (sout != 4 * sin);
    if (kind == 2 && yi[k] != 0 && err == 0) n_missed++;
  endtask

  always @(negedge clk) begin
    if (rst_n && chk_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected chk_valid at %0d", cyc);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (chk_err != e.err[0] || cyc != e.when) begin
          failures++;
          $display("FAIL cyc %0d: chk_err=%0b expected %0d at cyc %0d", cyc, chk_err, e.err, e.when);
        end
        if (chk_err) n_err++; else n_ok++;
      end
    end
  end

  initial begin
    int err;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= 200; f++) begin
      if (f < 200) begin
        make_frame();
        corrupt_and_score(err);
      end
      for (int n = 0; n < 4; n++) begin
        in_valid = (f < 200);
        in_last  = (n == 3);
        in_re = IN_W'(xr[n]); in_im = IN_W'(xi[n]);
        out_valid = have_prev[0];
        out_last  = (n == 3);
        out_re = OUT_W'(pr[n]); out_im = OUT_W'(pi_[n]);
        if (n == 3 && have_prev != 0) begin
          exp_t e;
          e.err = prev_err; e.when = cyc + 1;
          expq.push_back(e);
        end
        @(negedge clk);
      end
      pr = yr; pi_ = yi; prev_err = err; have_prev = 1;
      // occasional idle cycles between frames
      in_valid = 0; out_valid = 0;
      if ((f % 7) == 3) repeat (2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_err == 0 || n_ok == 0 || n_missed == 0) begin
      failures++;
      $display("FAIL: pending=%0d detected=%0d clean=%0d undetectable=%0d",
               expq.size(), n_err, n_ok, n_missed);
    end
    $display("frames flagged=%0d passed=%0d sign-flip (undetectable)=%0d", n_err, n_ok, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
