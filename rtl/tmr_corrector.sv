// tmr_corrector: the ECC corrector under triple modular redundancy.
//
// A soft error in the Parseval checks only causes an unneeded rebuild, whose
// result is still correct, but an error in the corrector would reach the
// outputs directly. This wrapper therefore runs three copies of
// ecc_corrector on the same inputs and passes every output bit through a
// two-out-of-three majority vote, so an error in any one copy is outvoted.
//
// Ports and timing are those of ecc_corrector (outputs registered, FFT_N + 1
// cycles from input to output), plus inj_copy, a test input: while
// inj_copy[m] is set, every output bit of copy m is inverted before the vote,
// modelling a soft error in that copy. Tie it to 0 in normal use.
//
// Protecting the correction logic with TMR follows the reference design's
// remark on errors in the protection logic; voting on the outputs, rather
// than also on internal state, is this design's choice.
module tmr_corrector #(
  parameter int unsigned OUT_W = 14,
  parameter int unsigned RED_W = 16,
  parameter int unsigned FFT_N = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              inj_copy,
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

  // all outputs of one copy, packed for voting
  typedef struct packed {
    logic                     valid;
    logic                     last;
    logic [NO-1:0][OUT_W-1:0] yr;
    logic [NO-1:0][OUT_W-1:0] yi;
    logic [NR-1:0]            syn;
    logic [NO-1:0]            flg;
    logic [NO-1:0]            cor;
    logic                     unc;
  } res_t;

  res_t res [3];
  res_t voted;

  for (genvar m = 0; m < 3; m++) begin : g_copy
    logic                    c_valid, c_last, c_unc;
    logic signed [OUT_W-1:0] c_yr [NO];
    logic signed [OUT_W-1:0] c_yi [NO];
    logic [NR-1:0]           c_syn;
    logic [NO-1:0]           c_flg, c_cor;

    ecc_corrector #(.OUT_W(OUT_W), .RED_W(RED_W), .FFT_N(FFT_N)) u_cor (
      .clk, .rst_n, .in_valid, .in_last, .z_re, .z_im, .r_re, .r_im,
      .flag_valid, .flags,
      .out_valid(c_valid), .out_last(c_last), .y_re(c_yr), .y_im(c_yi),
      .syndrome(c_syn), .flagged(c_flg), .corrected(c_cor), .uncorrectable(c_unc));

    always_comb begin
      res_t r;
      r.valid = c_valid;
      r.last  = c_last;
      for (int i = 0; i < NO; i++) begin
        r.yr[i] = c_yr[i];
        r.yi[i] = c_yi[i];
      end
      r.syn = c_syn;
      r.flg = c_flg;
      r.cor = c_cor;
      r.unc = c_unc;
      res[m] = inj_copy[m] ? ~r : r;
    end
  end

  // bitwise two-out-of-three majority
  assign voted = (res[0] & res[1]) | (res[0] & res[2]) | (res[1] & res[2]);

  always_comb begin
    out_valid = voted.valid;
    out_last  = voted.last;
    for (int i = 0; i < NO; i++) begin
      y_re[i] = voted.yr[i];
      y_im[i] = voted.yi[i];
    end
    syndrome      = voted.syn;
    flagged       = voted.flg;
    corrected     = voted.cor;
    uncorrectable = voted.unc;
  end

endmodule
