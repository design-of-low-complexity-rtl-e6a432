// tb_ft_parallel_fft_top: end-to-end test of the protected parallel FFTs at
// the design's default sizes (4 x 4-point FFTs, 12-bit inputs).
//
// Frames of four complex samples per stream are sent, back to back or with
// idle cycles. During chosen output bins, soft errors are injected through the
// fault-injection port into original and/or redundant FFTs. A reference model
// here computes, independently of the design: the exact DFT of every stream,
// the corrupted FFT outputs, the Parseval flags (sum of squares of the
// corrupted output frame against 4x that of the input frame), the Hamming
// syndrome of every sample, and the expected outputs:
//   * up to two flagged FFTs that hold all the errors: the exact DFT,
//   * three or four flags: the corrupted outputs and uncorrectable,
//   * no flags: the outputs as the FFTs gave them (an error in a redundant
//     FFT must not reach them).
// Every output bin is also checked for arrival time: bin k of a frame leaves
// FFT_N + 2 + k cycles after the last input sample.
// The first frame is the small example of inputs x1..x4 = 1, 2, 3, 4 with
// errors in the third and fourth FFT. Each mechanism (clean frame, single and
// double correction, every pair of FFTs, uncorrectable frame, error in a
// redundant FFT, undetected error, false Parseval flag from an error in the
// check logic, upset of one copy of the triplicated corrector, back-to-back
// frames, idle gaps) is counted and must occur at least once.
module tb_ft_parallel_fft_top;
  localparam int N = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] x_re [4];
  logic signed [11:0] x_im [4];
  logic [6:0]  inj_en = 0;
  logic [15:0] inj_re = 0, inj_im = 0;
  logic [3:0]  inj_flag = 0;
  logic [2:0]  inj_tmr = 0;
  int n_tmr = 0;
  // upset one corrector copy on random cycles
  always @(negedge clk) begin
    inj_tmr = 0;
    if (rst_n && ($urandom % 4 == 0)) begin
      inj_tmr = 3'(1 << ($urandom % 3));
      n_tmr++;
    end
  end
  logic ready, out_valid, out_last, uncorrectable;
  logic signed [13:0] y_re [4];
  logic signed [13:0] y_im [4];
  logic [3:0] sos_err, corrected;
  logic [2:0] syndrome;

  ft_parallel_fft_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- coverage of mechanisms
  int n_clean = 0, n_single = 0, n_double = 0, n_uncorr = 0, n_red = 0;
  int n_undetected = 0, n_b2b = 0, n_gap = 0, n_false = 0;
  int pair_seen[16];

  // ---------------- injection schedule, keyed by cycle
  typedef struct { logic [6:0] en; logic [15:0] re; logic [15:0] im; logic [3:0] fl; } inj_t;
  inj_t sched[int];
  always @(negedge clk) begin
    if (sched.exists(cyc)) begin
      inj_en = sched[cyc].en; inj_re = sched[cyc].re; inj_im = sched[cyc].im;
      inj_flag = sched[cyc].fl;
      sched.delete(cyc);
    end else begin
      inj_en = 0; inj_re = 0; inj_im = 0; inj_flag = 0;
    end
  end

  // ---------------- expected outputs
  typedef struct {
    int yr[4]; int yi[4]; int check_vals; int flags; int syn; int unc; int corr;
    int last; int when;
  } exp_t;
  exp_t expq[$];

  function automatic void dft4(input int xr[4], input int xi[4], output int yr[4], output int yi[4]);
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
  endfunction

  // members of checks C1..C3 among Z1..Z4 (error-location table)
  function automatic int members(input int c);
    case (c)
      0: return 4'b0111;
      1: return 4'b1011;
      default: return 4'b1101;
    endcase
  endfunction

  // errmask[k] = FFTs (bit 0..6 = FFT 1..7) corrupted in bin k
  task automatic send_frame(input int xr[4][4], input int xi[4][4],
                            input logic [6:0] errmask[4], input logic [15:0] pr[4],
                            input logic [15:0] pim[4], input int gap, input int swap,
                            input logic [3:0] false_flag);
    int gr[7][4], gi[7][4], fr[7][4], fi[7][4];
    int t0[4], t1[4], a[4], b[4];
    longint sin, sout;
    int flags, nfl, err_orig, err_red, c_last;
    // golden DFTs of the originals
    for (int i = 0; i < 4; i++) begin
      for (int n = 0; n < 4; n++) begin a[n] = xr[i][n]; b[n] = xi[i][n]; end
      dft4(a, b, t0, t1);
      for (int k = 0; k < 4; k++) begin gr[i][k] = t0[k]; gi[i][k] = t1[k]; end
    end
    // golden redundant outputs, by linearity
    for (int c = 0; c < 3; c++)
      for (int k = 0; k < 4; k++) begin
        gr[4+c][k] = 0; gi[4+c][k] = 0;
        for (int i = 0; i < 4; i++) if (members(c) & (1 << i)) begin
          gr[4+c][k] += gr[i][k]; gi[4+c][k] += gi[i][k];
        end
      end
    // swap: an error that exchanges real and imaginary parts of the lowest
    // selected FFT keeps its sum of squares, so Parseval cannot see it
    if (swap != 0)
      for (int k = 0; k < 4; k++)
        for (int m = 3; m >= 0; m--)
          if (errmask[k][m]) begin
            pr[k]  = 16'(gr[m][k] ^ gi[m][k]);
            pim[k] = pr[k];
          end
    // corrupted outputs
    err_orig = 0; err_red = 0;
    for (int m = 0; m < 7; m++)
      for (int k = 0; k < 4; k++) begin
        fr[m][k] = gr[m][k]; fi[m][k] = gi[m][k];
        if (errmask[k][m]) begin
          if (m < 4) begin
            fr[m][k] = $signed(14'(gr[m][k]) ^ pr[k][13:0]);
            fi[m][k] = $signed(14'(gi[m][k]) ^ pim[k][13:0]);
          end else begin
            fr[m][k] = $signed(16'(gr[m][k]) ^ pr[k]);
            fi[m][k] = $signed(16'(gi[m][k]) ^ pim[k]);
          end
        end
        if (fr[m][k] != gr[m][k] || fi[m][k] != gi[m][k]) begin
          if (m < 4) err_orig |= (1 << m); else err_red |= (1 << (m - 4));
        end
      end
    // Parseval flags
    flags = 0;
    for (int i = 0; i < 4; i++) begin
      sin = 0; sout = 0;
      for (int n = 0; n < 4; n++) begin
        sin  += longint'(xr[i][n]) * xr[i][n] + longint'(xi[i][n]) * xi[i][n];
        sout += longint'(fr[i][n]) * fr[i][n] + longint'(fi[i][n]) * fi[i][n];
      end
      if (sout != 4 * sin) flags |= (1 << i);
    end
    // a soft error in the check logic inverts flags
    flags ^= int'(false_flag);
    if (false_flag != 0 && err_orig == 0 && err_red == 0 && $countones(false_flag) <= 2)
      n_false++;
    nfl = $countones(flags[3:0]);
    // mechanisms
    if (err_orig == 0 && err_red == 0) n_clean++;
    if (nfl == 1) n_single++;
    if (nfl == 2) begin n_double++; pair_seen[flags]++; end
    if (nfl > 2) n_uncorr++;
    if (err_red != 0 && nfl == 0) n_red++;
    if ((err_orig & ~flags) != 0) n_undetected++;
    // drive the frame
    for (int n = 0; n < 4; n++) begin
      if (gap != 0 && n == 2) begin
        in_valid = 0;
        repeat (2) @(negedge clk);
      end
      in_valid = 1;
      for (int i = 0; i < 4; i++) begin
        x_re[i] = 12'(xr[i][n]); x_im[i] = 12'(xi[i][n]);
      end
      if (n == 3) c_last = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    // injection times: bin k is visible at the FFT outputs at c_last+1+k,
    // the Parseval result of the frame at c_last+1+N
    for (int k = 0; k < 4; k++) begin
      if (errmask[k] != 0) begin
        inj_t s;
        s.en = errmask[k]; s.re = pr[k]; s.im = pim[k]; s.fl = 0;
        if (sched.exists(c_last + 1 + k)) s.fl = sched[c_last + 1 + k].fl;
        sched[c_last + 1 + k] = s;
      end
    end
    if (false_flag != 0) begin
      inj_t s;
      s.en = 0; s.re = 0; s.im = 0; s.fl = false_flag;
      if (sched.exists(c_last + 1 + N)) begin
        s = sched[c_last + 1 + N];
        s.fl = false_flag;
      end
      sched[c_last + 1 + N] = s;
    end
    // expected outputs
    for (int k = 0; k < 4; k++) begin
      exp_t e;
      e.flags = flags;
      e.unc  = (nfl > 2);
      e.corr = (nfl > 2) ? 0 : flags;
      e.last = (k == 3);
      e.when = c_last + N + 2 + k;
      e.syn = 0;
      for (int c = 0; c < 3; c++) begin
        int sr = fr[4+c][k], si = fi[4+c][k];
        for (int i = 0; i < 4; i++) if (members(c) & (1 << i)) begin
          sr -= fr[i][k]; si -= fi[i][k];
        end
        if (sr != 0 || si != 0) e.syn |= (4 >> c);
      end
      e.check_vals = 1;
      if (nfl > 2 || nfl == 0) begin
        for (int i = 0; i < 4; i++) begin e.yr[i] = fr[i][k]; e.yi[i] = fi[i][k]; end
      end else if ((err_orig & ~flags) == 0 && err_red == 0) begin
        for (int i = 0; i < 4; i++) begin e.yr[i] = gr[i][k]; e.yi[i] = gi[i][k]; end
      end else begin
        e.check_vals = 0;   // errors outside the flagged set: not correctable
      end
      expq.push_back(e);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      logic bad;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output at %0d", cyc);
      end else begin
        e = expq.pop_front();
        bad = (cyc != e.when) || (out_last != e.last[0]) || (sos_err != 4'(e.flags)) ||
              (syndrome != 3'(e.syn)) || (uncorrectable != e.unc[0]) ||
              (corrected != 4'(e.corr));
        if (e.check_vals != 0)
          for (int i = 0; i < 4; i++)
            if (y_re[i] != e.yr[i] || y_im[i] != e.yi[i]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL cyc %0d/%0d: y=(%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d) flags %b/%0d syn %b/%0d unc %0b corr %b",
                   cyc, e.when, y_re[0], y_re[1], y_re[2], y_re[3],
                   e.yr[0], e.yr[1], e.yr[2], e.yr[3], sos_err, e.flags, syndrome, e.syn,
                   uncorrectable, corrected);
        end
      end
    end
  end

  task automatic random_frame(input int kind, input int gap);
    int xr[4][4], xi[4][4];
    logic [6:0]  em[4];
    logic [15:0] pr[4], pim[4];
    int sel, bin;
    for (int i = 0; i < 4; i++)
      for (int n = 0; n < 4; n++) begin
        xr[i][n] = $signed(12'($urandom));
        xi[i][n] = $signed(12'($urandom));
      end
    for (int k = 0; k < 4; k++) begin
      em[k] = 0;
      pr[k] = 16'(1 << ($urandom % 14));
      pim[k] = ($urandom % 2) ? 16'($urandom) : 16'h0;
    end
    bin = int'($urandom % 4);
    case (kind)
      0: ;                                            // clean
      1: em[bin] = 7'(1 << ($urandom % 4));            // one original FFT
      2: begin                                        // two original FFTs
        sel = int'($urandom % 4);
        em[bin] = 7'((1 << sel) | (1 << ((sel + 1 + $urandom % 3) % 4)));
      end
      3: em[bin] = 7'(4'hF & ~(1 << ($urandom % 4)));  // three original FFTs
      4: em[bin] = 7'(1 << (4 + $urandom % 3));        // one redundant FFT
      6: em[bin] = 7'(1 << ($urandom % 4));            // one FFT, re/im swapped
      7: ;                                            // false Parseval flag
      default: begin                                  // one FFT, every bin
        sel = int'($urandom % 4);
        for (int k = 0; k < 4; k++) em[k] = 7'(1 << sel);
      end
    endcase
    send_frame(xr, xi, em, pr, pim, gap, (kind == 6) ? 1 : 0,
               (kind == 7) ? 4'(1 << ($urandom % 4)) : 4'h0);
  endtask

  initial begin
    int xr[4][4], xi[4][4];
    logic [6:0]  em[4];
    logic [15:0] pr[4], pim[4];
    for (int i = 0; i < 4; i++) begin x_re[i] = 0; x_im[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!ready) begin
      failures++; $display("FAIL: not ready one cycle after reset");
    end
    // small example: x1..x4 = 1, 2, 3, 4 in every sample, errors in FFT 3 and 4
    for (int i = 0; i < 4; i++)
      for (int n = 0; n < 4; n++) begin xr[i][n] = i + 1; xi[i][n] = 0; end
    for (int k = 0; k < 4; k++) begin em[k] = 0; pr[k] = 16'h0001; pim[k] = 0; end
    em[0] = 7'b0001100;
    send_frame(xr, xi, em, pr, pim, 0, 0, 4'h0);
    // every pair of original FFTs, back to back
    for (int p = 0; p < 4; p++)
      for (int q = p + 1; q < 4; q++) begin
        for (int i = 0; i < 4; i++)
          for (int n = 0; n < 4; n++) begin
            xr[i][n] = $signed(12'($urandom)); xi[i][n] = $signed(12'($urandom));
          end
        for (int k = 0; k < 4; k++) begin em[k] = 0; pr[k] = 16'h0010; pim[k] = 16'h0003; end
        em[1] = 7'((1 << p) | (1 << q));
        send_frame(xr, xi, em, pr, pim, 0, 0, 4'h0);
        n_b2b++;
      end
    // random scenarios, with and without idle gaps
    for (int f = 0; f < 400; f++) begin
      int gap;
      gap = (f % 5 == 4) ? 1 : 0;
      if (gap) n_gap++; else n_b2b++;
      random_frame(int'($urandom % 8), gap);
    end
    repeat (12) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("FAIL: %0d bins never came out", expq.size());
    end
    $display("mechanisms: clean=%0d single=%0d double=%0d uncorrectable=%0d redundant=%0d undetected=%0d false_flag=%0d corrector_upsets=%0d b2b=%0d gaps=%0d",
             n_clean, n_single, n_double, n_uncorr, n_red, n_undetected, n_false, n_tmr, n_b2b, n_gap);
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0 || n_uncorr == 0 || n_red == 0 ||
        n_undetected == 0 || n_false == 0 || n_tmr == 0 || n_b2b == 0 || n_gap == 0) begin
      failures++; $display("FAIL: a mechanism never occurred");
    end
    foreach (pair_seen[m]) if ($countones(4'(m)) == 2) begin
      checks++;
      if (pair_seen[m] == 0) begin
        failures++; $display("FAIL: pair %b never corrected", 4'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
