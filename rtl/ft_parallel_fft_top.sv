// ft_parallel_fft_top: four parallel 4-point FFTs protected against soft
// errors by Parseval checks and a Hamming code over the FFTs.
//
// Structure (x1..x4 in, y1..y4 out, all complex, one sample per cycle):
//   * four original FFTs transform x1..x4;
//   * ecc_encoder forms X5 = x1+x2+x3, X6 = x1+x2+x4, X7 = x1+x3+x4, which
//     three redundant FFTs transform; by linearity their outputs equal the
//     same sums of the original outputs;
//   * a sos_check on every original FFT compares the sum of squares of its
//     output frame with N times that of its input frame and flags the FFT
//     when they differ (detection);
//   * ecc_corrector holds the seven output frames until the flags are known
//     and rebuilds up to two flagged outputs from the redundant outputs and
//     the unflagged originals (correction). With TMR = 1 (default) it runs
//     as three voted copies (tmr_corrector), since an error there would
//     reach the outputs; TMR = 0 builds a single copy.
//
// Interface: after reset, wait for ready (the FFTs fill their rotation-factor
// tables, one cycle for 4 points). Then present one sample of each input
// stream with in_valid; every four valid samples form a frame. The corrected frame leaves on four
// consecutive cycles (out_valid, out_last on the last bin), in natural bin
// order, FFT_N + 2 cycles after the last input sample of the frame (one cycle
// in the FFT, FFT_N in the frame buffer, one output register). sos_err,
// corrected and uncorrectable describe the frame being output; syndrome is
// the Hamming check pattern C1 C2 C3 of each uncorrected sample.
//
// inj_en / inj_re / inj_im are a fault-injection port for testing: while
// inj_en[i] is set, the output sample of FFT i+1 (FFT 5..7 for i = 4..6) is
// XORed with inj_re / inj_im (low bits for the narrower original FFTs),
// modelling a soft error inside that FFT. inj_flag inverts the Parseval
// flags of the frame whose check result is delivered in that cycle, modelling
// a soft error in the check logic: a false flag makes the corrector rebuild a
// correct output from the redundant FFTs, so the data stay correct. inj_tmr
// upsets one copy of the triplicated corrector (ignored with TMR = 0). Tie
// all inj_* inputs to 0 in normal use.
//
// Sizes, code and detection/correction split follow the reference design;
// the stream interface, the injection port and the latencies are this
// design's own.
module ft_parallel_fft_top #(
  parameter int unsigned     IN_W   = ft_pkg::IN_W,
  parameter int unsigned     ACC_W  = ft_pkg::ACC_W,
  parameter longint unsigned THRESH = 0,
  parameter bit              TMR    = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   x_re [ft_pkg::N_ORIG],
  input  logic signed [IN_W-1:0]   x_im [ft_pkg::N_ORIG],
  input  logic [ft_pkg::N_ORIG+ft_pkg::N_RED-1:0] inj_en,
  input  logic [IN_W+3:0]          inj_re,
  input  logic [IN_W+3:0]          inj_im,
  input  logic [ft_pkg::N_ORIG-1:0] inj_flag,
  input  logic [2:0]               inj_tmr,
  output logic                     out_valid,
  output logic                     out_last,
  output logic signed [IN_W+1:0]   y_re [ft_pkg::N_ORIG],
  output logic signed [IN_W+1:0]   y_im [ft_pkg::N_ORIG],
  output logic [ft_pkg::N_ORIG-1:0] sos_err,
  output logic [ft_pkg::N_RED-1:0]  syndrome,
  output logic [ft_pkg::N_ORIG-1:0] corrected,
  output logic                     uncorrectable
);

  localparam int unsigned NO     = ft_pkg::N_ORIG;
  localparam int unsigned NR     = ft_pkg::N_RED;
  localparam int unsigned FFT_N  = ft_pkg::FFT_N;
  localparam int unsigned LOG2N  = ft_pkg::LOG2N;
  localparam int unsigned OUT_W  = IN_W + LOG2N;      // 14
  localparam int unsigned RIN_W  = IN_W + 2;          // 14
  localparam int unsigned ROUT_W = RIN_W + LOG2N;     // 16

  // all FFTs have built their rotation-factor tables
  logic [NO+NR-1:0] fft_ready;
  assign ready = &fft_ready;

  // input frame position, for the Parseval input accumulators
  logic [LOG2N-1:0] in_pos;
  logic             in_last;
  always_ff @(posedge clk) begin
    if (!rst_n)        in_pos <= '0;
    else if (in_valid) in_pos <= in_pos + 1'b1;
  end
  assign in_last = (in_pos == LOG2N'(FFT_N - 1));

  // redundant inputs
  logic signed [RIN_W-1:0] xr_re [NR];
  logic signed [RIN_W-1:0] xr_im [NR];
  ecc_encoder #(.IN_W(IN_W), .RED_W(RIN_W)) u_enc (
    .x_re(x_re), .x_im(x_im), .r_re(xr_re), .r_im(xr_im));

  // original FFTs and their Parseval checks
  logic                     fo_valid [NO];
  logic                     fo_last  [NO];
  logic signed [OUT_W-1:0]  fo_re    [NO];
  logic signed [OUT_W-1:0]  fo_im    [NO];
  logic signed [OUT_W-1:0]  z_re     [NO];
  logic signed [OUT_W-1:0]  z_im     [NO];
  logic [NO-1:0]            chk_valid;
  logic [NO-1:0]            chk_err;

  for (genvar i = 0; i < NO; i++) begin : g_orig
    fft_core #(.LOG2N(LOG2N), .IN_W(IN_W), .OUT_W(OUT_W)) u_fft (
      .clk, .rst_n, .ready(fft_ready[i]), .in_valid,
      .in_re(x_re[i]), .in_im(x_im[i]),
      .out_valid(fo_valid[i]), .out_last(fo_last[i]),
      .out_re(fo_re[i]), .out_im(fo_im[i]));

    // fault injection: corrupt the FFT result
    assign z_re[i] = fo_re[i] ^ (inj_en[i] ? OUT_W'(inj_re) : '0);
    assign z_im[i] = fo_im[i] ^ (inj_en[i] ? OUT_W'(inj_im) : '0);

    sos_check #(.IN_W(IN_W), .OUT_W(OUT_W), .LOG2N(LOG2N), .ACC_W(ACC_W),
                .THRESH(THRESH)) u_sos (
      .clk, .rst_n,
      .in_valid, .in_last, .in_re(x_re[i]), .in_im(x_im[i]),
      .out_valid(fo_valid[i]), .out_last(fo_last[i]),
      .out_re(z_re[i]), .out_im(z_im[i]),
      .chk_valid(chk_valid[i]), .chk_err(chk_err[i]));
  end

  // redundant FFTs
  logic signed [ROUT_W-1:0] ro_re [NR];
  logic signed [ROUT_W-1:0] ro_im [NR];
  logic signed [ROUT_W-1:0] r_re  [NR];
  logic signed [ROUT_W-1:0] r_im  [NR];
  logic                     ro_valid [NR];
  logic                     ro_last  [NR];

  for (genvar c = 0; c < NR; c++) begin : g_red
    fft_core #(.LOG2N(LOG2N), .IN_W(RIN_W), .OUT_W(ROUT_W)) u_fft (
      .clk, .rst_n, .ready(fft_ready[NO+c]), .in_valid,
      .in_re(xr_re[c]), .in_im(xr_im[c]),
      .out_valid(ro_valid[c]), .out_last(ro_last[c]),
      .out_re(ro_re[c]), .out_im(ro_im[c]));

    assign r_re[c] = ro_re[c] ^ (inj_en[NO+c] ? ROUT_W'(inj_re) : '0);
    assign r_im[c] = ro_im[c] ^ (inj_en[NO+c] ? ROUT_W'(inj_im) : '0);
  end

  // all FFTs run in lockstep; FFT 1 provides the frame strobes
  if (TMR) begin : g_tmr
    tmr_corrector #(.OUT_W(OUT_W), .RED_W(ROUT_W), .FFT_N(FFT_N)) u_cor (
      .clk, .rst_n, .inj_copy(inj_tmr),
      .in_valid(fo_valid[0]), .in_last(fo_last[0]),
      .z_re, .z_im, .r_re, .r_im,
      .flag_valid(chk_valid[0]), .flags(chk_err ^ inj_flag),
      .out_valid, .out_last, .y_re, .y_im,
      .syndrome, .flagged(sos_err), .corrected, .uncorrectable);
  end else begin : g_single
    ecc_corrector #(.OUT_W(OUT_W), .RED_W(ROUT_W), .FFT_N(FFT_N)) u_cor (
      .clk, .rst_n,
      .in_valid(fo_valid[0]), .in_last(fo_last[0]),
      .z_re, .z_im, .r_re, .r_im,
      .flag_valid(chk_valid[0]), .flags(chk_err ^ inj_flag),
      .out_valid, .out_last, .y_re, .y_im,
      .syndrome, .flagged(sos_err), .corrected, .uncorrectable);
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fo_valid[0] == ro_valid[NR-1] && fo_last[0] == ro_last[0] && chk_valid[0] == chk_valid[NO-1]);

endmodule
