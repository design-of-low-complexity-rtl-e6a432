// ecc_corrector: rebuilds FFT outputs that failed their Parseval check.
//
// Inputs are the output streams of the four original FFTs (Z1..Z4) and of the
// three redundant FFTs (Z5..Z7), which carry Hamming-code combinations of the
// originals (see ft_pkg): Z5 = Z1+Z2+Z3, Z6 = Z1+Z2+Z4, Z7 = Z1+Z3+Z4.
//
// The Parseval flags of a frame are only known after its last sample, so the
// streams pass through a FFT_N-deep shift register. The flags arrive (one-
// cycle flag_valid pulse) exactly when the first sample of the frame reaches
// the end of that register; they are used for that sample and held for the
// rest of the frame. Each flagged output is then replaced using a check that
// contains it: Zi = Zc - (sum of the other members of check c), using a
// check whose other members are all trustworthy. For a pair of flagged
// outputs in which every check of one output also holds the other (Z1 with
// any of Z2..Z4), Z1 is rebuilt first and the other from the rebuilt Z1, in
// the same cycle. So any one or two flagged outputs are corrected;
// with three or four flags the outputs pass unchanged and uncorrectable is
// set. Flags refer to the original FFTs only: an error in a redundant FFT
// does not reach the outputs and triggers no correction.
//
// flagged repeats, per output sample, the Parseval flags of its frame, and
// corrected says which outputs were rebuilt. syndrome gives, per sample,
// which checks C1 C2 C3 fail on the uncorrected values (bit 2 = C1); the
// error-location table of the Hamming code maps it to the output in error
// (111 = Z1, 110 = Z2, 101 = Z3, 011 = Z4, 100/010/001 = Z5/Z6/Z7).
//
// Timing: a sample entering at cycle t leaves, registered, at t + FFT_N + 1.
// The code, the correction equations and the use of the Parseval flags to
// locate errors follow the reference design; the shift-register frame buffer,
// the order of rebuilding and the handling of three or more flags are this
// design's own choices.
module ecc_corrector #(
  parameter int unsigned OUT_W = 14,
  parameter int unsigned RED_W = 16,
  parameter int unsigned FFT_N = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [OUT_W-1:0] z_re [ft_pkg::N_ORIG],
  input  logic signed [OUT_W-1:0] z_im [ft_pkg::N_ORIG],
  input  logic signed [RED_W-1:0] r_re [ft_pkg::N_RED],
  input  logic signed [RED_W-1:0] r_im [ft_pkg::N_RED],
  input  logic                    flag_valid,
  input  logic [ft_pkg::N_ORIG-1:0] flags,
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] y_re [ft_pkg::N_ORIG],
  output logic signed [OUT_W-1:0] y_im [ft_pkg::N_ORIG],
  output logic [ft_pkg::N_RED-1:0]  syndrome,
  output logic [ft_pkg::N_ORIG-1:0] flagged,
  output logic [ft_pkg::N_ORIG-1:0] corrected,
  output logic                    uncorrectable
);

  localparam int unsigned NO = ft_pkg::N_ORIG;
  localparam int unsigned NR = ft_pkg::N_RED;
  localparam int unsigned W  = RED_W + 2;   // working width of the checks

  // One sample of all seven streams.
  typedef struct packed {
    logic                    valid;
    logic                    last;
    logic [NO-1:0][OUT_W-1:0] zr;
    logic [NO-1:0][OUT_W-1:0] zi;
    logic [NR-1:0][RED_W-1:0] rr;
    logic [NR-1:0][RED_W-1:0] ri;
  } slot_t;

  slot_t                dly [FFT_N];
  slot_t                head;
  logic [NO-1:0]        flags_hold;
  logic [NO-1:0]        flags_cur;

  always_comb begin
    head.valid = in_valid;
    head.last  = in_last;
    for (int i = 0; i < NO; i++) begin
      head.zr[i] = z_re[i];
      head.zi[i] = z_im[i];
    end
    for (int c = 0; c < NR; c++) begin
      head.rr[c] = r_re[c];
      head.ri[c] = r_im[c];
    end
  end

  assign flags_cur = flag_valid ? flags : flags_hold;

  // Correction of the sample at the end of the shift register.
  logic signed [W-1:0]   vr [NO];
  logic signed [W-1:0]   vi [NO];
  logic [NO-1:0]         fixed;
  logic [NR-1:0]         syn;
  logic                  too_many;

  slot_t s;
  assign s = dly[FFT_N-1];

  always_comb begin
    logic signed [W-1:0] cr, ci, sr, si;
    logic                clean;
    int unsigned         nflag;
    cr = '0;
    ci = '0;
    clean = 1'b0;
    for (int i = 0; i < NO; i++) begin
      vr[i] = W'($signed(s.zr[i]));
      vi[i] = W'($signed(s.zi[i]));
    end
    // syndrome on the raw values
    for (int c = 0; c < NR; c++) begin
      sr = W'($signed(s.rr[c]));
      si = W'($signed(s.ri[c]));
      for (int i = 0; i < NO; i++) begin
        if (ft_pkg::in_check(i, c)) begin
          sr = sr - vr[i];
          si = si - vi[i];
        end
      end
      syn[NR-1-c] = (sr != '0) || (si != '0);
    end
    nflag = 0;
    for (int i = 0; i < NO; i++) nflag += 32'(flags_cur[i]);
    too_many = (nflag > 2);
    // Rebuild each flagged output from a check whose other members are all
    // trusted (unflagged, or already rebuilt). Z1 is visited first: it is in
    // every check, and once it is rebuilt a second flagged output always has
    // a usable check.
    fixed = '0;
    if (!too_many) begin
      for (int i = 0; i < NO; i++) begin
        if (flags_cur[i]) begin
          for (int c = 0; c < NR; c++) begin
            clean = ft_pkg::in_check(i, c);
            for (int j = 0; j < NO; j++) begin
              if (j != i && ft_pkg::in_check(j, c) && flags_cur[j] && !fixed[j])
                clean = 1'b0;
            end
            if (clean && !fixed[i]) begin
              cr = W'($signed(s.rr[c]));
              ci = W'($signed(s.ri[c]));
              for (int j = 0; j < NO; j++) begin
                if (j != i && ft_pkg::in_check(j, c)) begin
                  cr = cr - vr[j];
                  ci = ci - vi[j];
                end
              end
              vr[i]    = cr;
              vi[i]    = ci;
              fixed[i] = 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < FFT_N; k++) dly[k] <= '0;
      flags_hold    <= '0;
      out_valid     <= 1'b0;
      out_last      <= 1'b0;
      syndrome      <= '0;
      flagged       <= '0;
      corrected     <= '0;
      uncorrectable <= 1'b0;
      for (int i = 0; i < NO; i++) begin
        y_re[i] <= '0;
        y_im[i] <= '0;
      end
    end else begin
      dly[0] <= head;
      for (int k = 1; k < FFT_N; k++) dly[k] <= dly[k-1];
      if (flag_valid) flags_hold <= flags;
      out_valid     <= s.valid;
      out_last      <= s.last;
      syndrome      <= syn;
      flagged       <= s.valid ? flags_cur : '0;
      corrected     <= s.valid ? fixed : '0;
      uncorrectable <= too_many && s.valid;
      for (int i = 0; i < NO; i++) begin
        y_re[i] <= OUT_W'(vr[i]);
        y_im[i] <= OUT_W'(vi[i]);
      end
    end
  end

  // The flags of a frame must arrive with its first sample.
  a_flag_timing: assert property (@(posedge clk) disable iff (!rst_n)
    flag_valid |-> s.valid);

endmodule
