// fft_core_harness: drives one fft_core of size 2^LOG2N with random frames
// and checks its bins against a DFT computed here in floating point from the
// definition X[k] = sum x[n] exp(-j 2 pi n k / N). A bin passes when its real
// and imaginary parts are within TOL of the rounded reference (TOL = 0
// demands an exact result). Also checked: ready after reset within N/2
// cycles, bin order, out_last, and that bin k leaves k+1 cycles after the
// last input sample of its frame. Frames are sent back to back, with gaps,
// and at full scale. done rises when all frames have been checked.
module fft_core_harness #(
  parameter int LOG2N  = 2,
  parameter int TOL    = 0,
  parameter int FRAMES = 60
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int N = 1 << LOG2N;
  localparam int IN_W = 12, OUT_W = IN_W + LOG2N;
  localparam real PI = 3.14159265358979323846;

  logic rst_n = 0, in_valid = 0, ready;
  logic signed [IN_W-1:0]  in_re = 0, in_im = 0;
  logic out_valid, out_last;
  logic signed [OUT_W-1:0] out_re, out_im;

  fft_core #(.LOG2N(LOG2N), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int re; int im; int last; int when; } exp_t;
  exp_t expq[$];
  int maxerr = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
  end

  task automatic push_expected(input int xr[], input int xi[], input int c);
    for (int k = 0; k < N; k++) begin
      exp_t e;
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        real ang;
        ang = -2.0 * PI * real'((n * k) % N) / real'(N);
        sr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        si += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      e.re = $rtoi(sr >= 0.0 ? sr + 0.5 : sr - 0.5);
      e.im = $rtoi(si >= 0.0 ? si + 0.5 : si - 0.5);
      e.last = (k == N - 1);
      e.when = c + 1 + k;
      expq.push_back(e);
    end
  endtask

  task automatic send_frame(input int gaps, input int mode);
    int xr[], xi[];
    xr = new[N]; xi = new[N];
    for (int n = 0; n < N; n++) begin
      if (mode == 1) begin
        xr[n] = ($urandom % 2) ? 2047 : -2048;
        xi[n] = ($urandom % 2) ? 2047 : -2048;
      end else begin
        xr[n] = $signed(12'($urandom));
        xi[n] = $signed(12'($urandom));
      end
    end
    for (int n = 0; n < N; n++) begin
      if (gaps != 0) begin
        in_valid = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      in_valid = 1;
      in_re = IN_W'(xr[n]);
      in_im = IN_W'(xi[n]);
      if (n == N - 1) push_expected(xr, xi, cyc);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int dr, di;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL N=%0d: unexpected output at cycle %0d", N, cyc);
      end else begin
        exp_t e;
        e = expq.pop_front();
        dr = int'(out_re) - e.re; di = int'(out_im) - e.im;
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        if (dr > TOL || di > TOL || out_last != e.last[0] || cyc != e.when) begin
          failures++;
          $display("FAIL N=%0d cyc %0d: got (%0d,%0d) last=%0b, expected (%0d,%0d) last=%0b at cyc %0d",
                   N, cyc, out_re, out_im, out_last, e.re, e.im, e.last, e.when);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the rotation-factor table needs N/2 - 1 cycles
    repeat (N / 2) @(negedge clk);
    checks++;
    if (!ready) begin
      failures++;
      $display("FAIL N=%0d: not ready %0d cycles after reset", N, N / 2);
    end
    for (int f = 0; f < FRAMES; f++) send_frame(0, f % 2);
    for (int f = 0; f < FRAMES; f++) send_frame(1, 0);
    repeat (N + 4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL N=%0d: %0d bins never came out", N, expq.size());
    end
    $display("N=%0d: largest deviation from the exact DFT %0d LSB (allowed %0d)", N, maxerr, TOL);
    done = 1;
  end
endmodule
