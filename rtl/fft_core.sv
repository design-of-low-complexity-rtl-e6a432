// fft_core: sample-serial radix-2 FFT of complex two's-complement samples,
// with its rotation factors computed on line and kept in registers.
//
// Operation. One frame is N = 2^LOG2N input samples x[0..N-1], one per
// in_valid strobe (gaps are allowed). When the last sample of a frame arrives,
// the transform is computed by a decimation-in-time network of LOG2N radix-2
// butterfly stages (inputs in bit-reversed order, outputs in natural order)
// and loaded into an output register bank. The N bins X[0..N-1] then leave in
// natural order on N consecutive cycles, starting the cycle after the last
// input, with out_last on X[N-1]. The next frame may be written while the
// current one is read out, so the core keeps up with one sample per cycle.
//
// Rotation factors. Stage s uses W_(2^(s+1))^j, which are all members of the
// table W_N^k = exp(-j*2*pi*k/N), k = 0..N/2-1. That table is not stored as
// constants: after reset a small sequential generator fills a register bank
// with it, starting from W_N^0 = 1 and multiplying by the base rotation
// W_N^1 once per cycle. ready rises when the table is complete, N/2 - 1
// cycles after reset (the next cycle for the default N = 4); no input may be
// given before. Factors have TW_W bits with TW_W - 2 fraction bits.
//
// Arithmetic. The data grow by one bit per stage and are never scaled, so
// OUT_W = IN_W + LOG2N. Products are rounded to nearest. For the default
// N = 4 the only factors are 1 and -j, which the format holds exactly, so the
// transform is exact and Parseval's relation holds without error; larger N
// carry rounding error of a few output LSBs.
//
// The 4-point default, the 12-bit input and 14-bit output widths, the
// configurable size and the on-line computation of the rotation factors
// follow the reference design. The size is fixed when the core is built (a
// parameter), not selected at run time. The streaming interface, the
// parallel butterfly network, the recurrence that generates the factors,
// complex samples and the synchronous active-low reset are this design's own
// choices.
module fft_core #(
  parameter int unsigned LOG2N = 2,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = IN_W + LOG2N,
  parameter int unsigned TW_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  localparam int unsigned N    = 1 << LOG2N;
  localparam int unsigned NH   = (N / 2 > 1) ? N / 2 : 2;   // table size, at least 2
  localparam int unsigned KW   = $clog2(NH);
  localparam int unsigned FRAC = TW_W - 2;
  localparam int unsigned PW   = OUT_W + TW_W + 1;          // product width
  localparam real         PI   = 3.14159265358979323846;

  typedef logic signed [TW_W-1:0]  tw_t;
  typedef logic signed [OUT_W-1:0] dat_t;

  // base rotation W_N^1 = cos(2 pi/N) - j sin(2 pi/N), rounded to TW_W bits
  function automatic tw_t round_tw(input real v);
    real s;
    s = v * real'(longint'(1) << FRAC);
    return tw_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction
  localparam tw_t BASE_RE = round_tw($cos(2.0 * PI / real'(N)));
  localparam tw_t BASE_IM = round_tw(-$sin(2.0 * PI / real'(N)));
  localparam tw_t ONE     = tw_t'(longint'(1) << FRAC);

  // rounded fixed-point product (a * w) >> FRAC, for data and factors alike
  function automatic logic signed [PW-1:0] rmul(input logic signed [PW-1:0] a,
                                                input logic signed [PW-1:0] b,
                                                input logic signed [PW-1:0] c,
                                                input logic signed [PW-1:0] d);
    // returns (a*b - c*d) rounded and shifted
    logic signed [2*PW-1:0] p;
    p = (2*PW)'(a) * (2*PW)'(b) - (2*PW)'(c) * (2*PW)'(d);
    p = p + (2*PW)'(longint'(1) << (FRAC - 1));
    return PW'(p >>> FRAC);
  endfunction

  // ---------------------------------------------------------------- factors
  tw_t                     tw_re [NH];
  tw_t                     tw_im [NH];
  logic [KW-1:0]           gen_k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        tw_re[k] <= '0;
        tw_im[k] <= '0;
      end
      tw_re[0] <= ONE;
      gen_k    <= KW'(1);
      ready    <= (N / 2 <= 1);
    end else if (!ready) begin
      tw_re[gen_k] <= tw_t'(rmul(PW'(tw_re[gen_k-1]), PW'(BASE_RE), PW'(tw_im[gen_k-1]), PW'(BASE_IM)));
      tw_im[gen_k] <= tw_t'(rmul(PW'(tw_re[gen_k-1]), PW'(BASE_IM), -PW'(tw_im[gen_k-1]), PW'(BASE_RE)));
      gen_k        <= gen_k + 1'b1;
      if (gen_k == KW'(N / 2 - 1)) ready <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- frame in
  logic [LOG2N-1:0] in_cnt;
  dat_t             buf_re [N-1];
  dat_t             buf_im [N-1];
  dat_t             res_re [N];
  dat_t             res_im [N];

  function automatic int unsigned bitrev(input int unsigned v);
    int unsigned r;
    r = 0;
    for (int b = 0; b < LOG2N; b++) r |= ((v >> b) & 1) << (LOG2N - 1 - b);
    return r;
  endfunction

  // decimation-in-time butterfly network on the stored samples and the one
  // arriving now
  always_comb begin
    dat_t a_re [N];
    dat_t a_im [N];
    dat_t u_re, u_im, t_re, t_im;
    int unsigned m, half;
    logic [KW-1:0] ti;
    for (int n = 0; n < N; n++) begin
      a_re[bitrev(n)] = (n < N - 1) ? buf_re[n] : dat_t'(in_re);
      a_im[bitrev(n)] = (n < N - 1) ? buf_im[n] : dat_t'(in_im);
    end
    for (int s = 0; s < LOG2N; s++) begin
      m    = 2 << s;
      half = 1 << s;
      for (int k = 0; k < N; k += m) begin
        for (int j = 0; j < half; j++) begin
          ti   = KW'(j * (N / m));
          t_re = dat_t'(rmul(PW'(a_re[k+j+half]), PW'(tw_re[ti]), PW'(a_im[k+j+half]), PW'(tw_im[ti])));
          t_im = dat_t'(rmul(PW'(a_re[k+j+half]), PW'(tw_im[ti]), -PW'(a_im[k+j+half]), PW'(tw_re[ti])));
          u_re = a_re[k+j];
          u_im = a_im[k+j];
          a_re[k+j]      = u_re + t_re;
          a_im[k+j]      = u_im + t_im;
          a_re[k+j+half] = u_re - t_re;
          a_im[k+j+half] = u_im - t_im;
        end
      end
    end
    for (int n = 0; n < N; n++) begin
      res_re[n] = a_re[n];
      res_im[n] = a_im[n];
    end
  end

  // ---------------------------------------------------------------- frame out
  dat_t             bin_re [N];
  dat_t             bin_im [N];
  logic [LOG2N-1:0] out_cnt;
  logic             busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt  <= '0;
      out_cnt <= '0;
      busy    <= 1'b0;
      for (int k = 0; k < N - 1; k++) begin
        buf_re[k] <= '0;
        buf_im[k] <= '0;
      end
      for (int k = 0; k < N; k++) begin
        bin_re[k] <= '0;
        bin_im[k] <= '0;
      end
    end else begin
      if (busy) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == LOG2N'(N - 1)) busy <= 1'b0;
      end
      if (in_valid) begin
        in_cnt <= in_cnt + 1'b1;
        if (in_cnt == LOG2N'(N - 1)) begin
          for (int k = 0; k < N; k++) begin
            bin_re[k] <= res_re[k];
            bin_im[k] <= res_im[k];
          end
          busy    <= 1'b1;
          out_cnt <= '0;
        end else begin
          buf_re[in_cnt] <= dat_t'(in_re);
          buf_im[in_cnt] <= dat_t'(in_im);
        end
      end
    end
  end

  assign out_valid = busy;
  assign out_last  = busy && (out_cnt == LOG2N'(N - 1));
  assign out_re    = bin_re[out_cnt];
  assign out_im    = bin_im[out_cnt];

  // no input before the factor table is complete
  a_ready: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> ready);
  // a new frame can only complete once the previous one has been read out
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_cnt == LOG2N'(N - 1) && busy) |-> out_last);

endmodule
