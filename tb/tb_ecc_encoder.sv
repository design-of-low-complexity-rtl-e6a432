// tb_ecc_encoder: self-checking test of the redundant-input sums.
//
// Random and full-scale samples are applied; the expected outputs are the
// three sums written out here by hand, X5 = X1+X2+X3, X6 = X1+X2+X4,
// X7 = X1+X3+X4, for the real and imaginary parts.
module tb_ecc_encoder;
  localparam int IN_W = 12, RED_W = 14;

  logic signed [IN_W-1:0]  x_re [4];
  logic signed [IN_W-1:0]  x_im [4];
  logic signed [RED_W-1:0] r_re [3];
  logic signed [RED_W-1:0] r_im [3];

  ecc_encoder #(.IN_W(IN_W), .RED_W(RED_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check_one();
    int a[4], b[4], er[3], ei[3];
    for (int i = 0; i < 4; i++) begin
      a[i] = x_re[i];
      b[i] = x_im[i];
    end
    er[0] = a[0] + a[1] + a[2];  ei[0] = b[0] + b[1] + b[2];
    er[1] = a[0] + a[1] + a[3];  ei[1] = b[0] + b[1] + b[3];
    er[2] = a[0] + a[2] + a[3];  ei[2] = b[0] + b[2] + b[3];
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (r_re[c] != er[c] || r_im[c] != ei[c]) begin
        failures++;
        $display("FAIL X%0d: got (%0d,%0d) expected (%0d,%0d)", c + 5, r_re[c], r_im[c], er[c], ei[c]);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) begin
        if (t < 16) begin
          // corners: all most-negative / all most-positive mixes
          x_re[i] = t[i] ? 12'sh7FF : 12'sh800;
          x_im[i] = t[i] ? 12'sh800 : 12'sh7FF;
        end else begin
          x_re[i] = 12'($urandom);
          x_im[i] = 12'($urandom);
        end
      end
      #1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
