// sos_check: Parseval (sum of squares) check of one streaming FFT.
//
// Parseval's theorem for an unscaled N-point DFT says that the sum over a
// frame of |X[k]|^2 equals N times the sum of |x[n]|^2. Because the FFT takes
// and gives its samples one per cycle, both sums are built sequentially by
// two accumulators: one adds re^2 + im^2 of each input sample, the other of
// each output sample. At the end of the input frame (in_last) the input sum is
// moved to a holding register, so the next frame may enter the FFT while the
// current one is still leaving it. With the last output sample (out_last) the
// output sum is compared with the held input sum shifted left by LOG2N; the
// result is registered, so chk_valid pulses for one cycle, the cycle after
// out_last, with chk_err set when |out_sum - N*in_sum| > THRESH.
//
// The sequential check, the comparison at the end of the frame and the 39-bit
// accumulator follow the reference design. The threshold of 0 is this
// design's choice: the FFT it checks is exact, so any difference is an error.
// Errors that happen to preserve the sum of squares (a sign flip, for
// instance) are not detected; this is inherent in the Parseval check.
module sos_check #(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned OUT_W  = 14,
  parameter int unsigned LOG2N  = 2,
  parameter int unsigned ACC_W  = 39,
  parameter longint unsigned THRESH = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic                    out_valid,
  input  logic                    out_last,
  input  logic signed [OUT_W-1:0] out_re,
  input  logic signed [OUT_W-1:0] out_im,
  output logic                    chk_valid,
  output logic                    chk_err
);

  logic        [ACC_W-1:0] in_acc, in_total, out_acc;
  logic        [ACC_W-1:0] in_sq, out_sq, in_next, out_next, in_scaled;
  logic signed [ACC_W:0]   diff;
  logic        [ACC_W:0]   diff_abs;

  // squares are non-negative; widen before multiplying
  always_comb begin
    logic signed [ACC_W:0] ir, ii, orr, oi;
    ir  = (ACC_W+1)'(in_re);
    ii  = (ACC_W+1)'(in_im);
    orr = (ACC_W+1)'(out_re);
    oi  = (ACC_W+1)'(out_im);
    in_sq     = ACC_W'(ir * ir + ii * ii);
    out_sq    = ACC_W'(orr * orr + oi * oi);
    in_next   = in_acc + in_sq;
    out_next  = out_acc + out_sq;
    in_scaled = in_total << LOG2N;
    diff      = signed'({1'b0, out_next}) - signed'({1'b0, in_scaled});
    diff_abs  = diff[ACC_W] ? (ACC_W+1)'(-diff) : (ACC_W+1)'(diff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_acc    <= '0;
      in_total  <= '0;
      out_acc   <= '0;
      chk_valid <= 1'b0;
      chk_err   <= 1'b0;
    end else begin
      chk_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          in_total <= in_next;
          in_acc   <= '0;
        end else begin
          in_acc   <= in_next;
        end
      end
      if (out_valid) begin
        if (out_last) begin
          out_acc   <= '0;
          chk_valid <= 1'b1;
          chk_err   <= (diff_abs > (ACC_W+1)'(THRESH));
        end else begin
          out_acc   <= out_next;
        end
      end
    end
  end

endmodule
