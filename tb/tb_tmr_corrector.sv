// tb_tmr_corrector: self-checking test of the triplicated corrector.
//
// The stimulus and expected results are those of the plain corrector test
// below; in addition, on a random third of the cycles one of the three copies
// has all its outputs inverted (inj_copy). The voted outputs must stay exactly
// as expected, and the test counts how many cycles were disturbed.
//
// Frames of four samples are streamed back to back or with gaps. Each sample
// holds random original outputs Z1..Z4 and the redundant outputs
// Z5 = Z1+Z2+Z3, Z6 = Z1+Z2+Z4, Z7 = Z1+Z3+Z4. Per frame a random set of
// outputs (originals and/or redundant) is corrupted, and the Parseval flags
// of the corrupted originals are raised one cycle after the frame's last
// sample, as the Parseval checks deliver them. Expected results:
//   * no, one or two flags: the outputs equal the uncorrupted Z1..Z4 (an
//     error in a redundant output with no flag leaves the outputs alone),
//   * three or four flags: outputs pass unchanged, uncorrectable is set;
//   * the syndrome equals the Hamming check pattern of the raw sample,
//   * every sample leaves FFT_N + 1 = 5 cycles after it entered.
// Every one of the eleven flag patterns with one or two flags is covered.
module tb_tmr_corrector;
  localparam int OUT_W = 14, RED_W = 16, N = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, flag_valid = 0;
  logic signed [OUT_W-1:0] z_re [4];
  logic signed [OUT_W-1:0] z_im [4];
  logic signed [RED_W-1:0] r_re [3];
  logic signed [RED_W-1:0] r_im [3];
  logic [3:0] flags = 0;
  logic out_valid, out_last, uncorrectable;
  logic signed [OUT_W-1:0] y_re [4];
  logic signed [OUT_W-1:0] y_im [4];
  logic [2:0] syndrome;
  logic [3:0] flagged, corrected;
  logic [2:0] inj_copy = 0;
  int n_disturbed = 0;

  tmr_corrector #(.OUT_W(OUT_W), .RED_W(RED_W), .FFT_N(N)) dut (.*);

  // upset one copy at random
  always @(negedge clk) begin
    inj_copy = 0;
    if (rst_n && ($urandom % 3 == 0)) begin
      inj_copy = 3'(1 << ($urandom % 3));
      n_disturbed++;
    end
  end

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    int yr[4]; int yi[4]; int syn; int last; int unc; int corr; int when;
  } exp_t;
  exp_t expq[$];
  int pattern_seen[16];

  // syndrome bit for check c (0 = C1): members per the error-location table
  function automatic int members(input int c);
    case (c)
      0: return 4'b0111;   // Z1 Z2 Z3
      1: return 4'b1011;   // Z1 Z2 Z4
      default: return 4'b1101; // Z1 Z3 Z4
    endcase
  endfunction

  task automatic send_frame(input int fl, input int redbad, input int gaps);
    int zr[4], zi[4], rr[3], ri[3], nfl;
    nfl = $countones(fl[3:0]);
    for (int n = 0; n < N; n++) begin
      exp_t e;
      for (int i = 0; i < 4; i++) begin
        zr[i] = $signed(14'($urandom)) / 4;
        zi[i] = $signed(14'($urandom)) / 4;
      end
      for (int c = 0; c < 3; c++) begin
        rr[c] = 0; ri[c] = 0;
        for (int i = 0; i < 4; i++) if (members(c) & (1 << i)) begin
          rr[c] += zr[i]; ri[c] += zi[i];
        end
      end
      // the good values are expected unless too many flags
      for (int i = 0; i < 4; i++) begin e.yr[i] = zr[i]; e.yi[i] = zi[i]; end
      // corruption
      for (int i = 0; i < 4; i++) if (fl & (1 << i)) begin
        zr[i] = $signed(14'(zr[i] + int'($urandom % 100) + 1));
        if (nfl > 2) begin e.yr[i] = zr[i]; end
      end
      for (int c = 0; c < 3; c++) if (redbad & (1 << c)) ri[c] = ri[c] - 7;
      e.syn = 0;
      for (int c = 0; c < 3; c++) begin
        int sr = rr[c], si = ri[c];
        for (int i = 0; i < 4; i++) if (members(c) & (1 << i)) begin
          sr -= zr[i]; si -= zi[i];
        end
        if (sr != 0 || si != 0) e.syn |= (4 >> c);
      end
      e.last = (n == N - 1);
      e.unc  = (nfl > 2);
      e.corr = (nfl > 2) ? 0 : fl;
      e.when = cyc + N + 1;
      expq.push_back(e);
      in_valid = 1; in_last = (n == N - 1);
      for (int i = 0; i < 4; i++) begin z_re[i] = OUT_W'(zr[i]); z_im[i] = OUT_W'(zi[i]); end
      for (int c = 0; c < 3; c++) begin r_re[c] = RED_W'(rr[c]); r_im[c] = RED_W'(ri[c]); end
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    // flags one cycle after the last sample, whatever comes next
    fork
      begin
        flag_valid = 1; flags = 4'(fl);
        @(negedge clk);
        flag_valid = 0; flags = 0;
      end
    join_none
    pattern_seen[fl]++;
    if (gaps != 0) repeat (1 + $urandom % 3) @(negedge clk);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output at %0d", cyc);
      end else begin
        logic bad;
        e = expq.pop_front();
        bad = (syndrome != 3'(e.syn)) || (out_last != e.last[0]) ||
              (uncorrectable != e.unc[0]) || (corrected != 4'(e.corr)) || (cyc != e.when);
        for (int i = 0; i < 4; i++)
          if (y_re[i] != e.yr[i] || y_im[i] != e.yi[i]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL cyc %0d (exp %0d): y=(%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d) syn=%b/%0d unc=%0b corr=%b/%0d",
                   cyc, e.when, y_re[0], y_re[1], y_re[2], y_re[3], e.yr[0], e.yr[1], e.yr[2], e.yr[3],
                   syndrome, e.syn, uncorrectable, corrected, e.corr);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) begin z_re[i] = 0; z_im[i] = 0; end
    for (int c = 0; c < 3; c++) begin r_re[c] = 0; r_im[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // every flag pattern, no redundant error, back to back
    for (int fl = 0; fl < 16; fl++) send_frame(fl, 0, 0);
    // single redundant-FFT errors without flags
    for (int c = 0; c < 3; c++) send_frame(0, 1 << c, 0);
    // random mix with gaps
    // (an error in a redundant output is combined only with unflagged frames:
    // a rebuilt output is only as good as the redundant output it uses)
    for (int f = 0; f < 300; f++) begin
      int fl = int'($urandom % 16);
      send_frame(fl, (fl == 0) ? int'($urandom % 8) : 0, f % 2);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("FAIL: %0d samples never came out", expq.size());
    end
    checks++;
    if (n_disturbed == 0) begin
      failures++; $display("FAIL: no copy was ever upset");
    end
    $display("cycles with one copy upset: %0d", n_disturbed);
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
