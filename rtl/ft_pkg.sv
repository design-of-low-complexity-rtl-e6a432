// ft_pkg: constants shared by the fault-tolerant parallel FFT design.
//
// The design protects four parallel FFTs with a Parseval (sum of squares)
// check on each and with three redundant FFTs that form a Hamming code over
// the FFT outputs. This package holds the sizes and the parity-check matrix
// of that code.
//
// Hamming code: output Zi (i = 1..7) takes part in check Cj when bit j of
// H_COL[i-1] is set; bit 2 is C1, bit 1 is C2, bit 0 is C3. The columns are
// the error patterns of the code's syndrome table: Z1 = 111, Z2 = 110,
// Z3 = 101, Z4 = 011, and the redundant outputs Z5 = 100, Z6 = 010,
// Z7 = 001. Hence X5 = X1+X2+X3, X6 = X1+X2+X4 and X7 = X1+X3+X4.
//
// The numbers (four FFTs, three redundant ones, 4-point FFTs, 12/14-bit data
// on the original FFTs, 14/16-bit on the redundant ones, 39-bit Parseval
// accumulators) are those of the reference design; the use of complex
// samples is this design's choice.
package ft_pkg;

  localparam int unsigned N_ORIG = 4;   // original (protected) FFTs
  localparam int unsigned N_RED  = 3;   // redundant FFTs (Hamming check modules)
  localparam int unsigned FFT_N  = 4;   // points per FFT
  localparam int unsigned LOG2N  = 2;

  localparam int unsigned IN_W      = 12;          // original FFT input width
  localparam int unsigned OUT_W     = IN_W + LOG2N; // original FFT output width (14)
  localparam int unsigned RED_IN_W  = IN_W + 2;    // redundant input: sum of three (14)
  localparam int unsigned RED_OUT_W = RED_IN_W + LOG2N; // redundant output (16)
  localparam int unsigned ACC_W     = 39;          // Parseval accumulator width

  // Parity-check matrix columns, index 0..6 = Z1..Z7, bit 2 = C1, 1 = C2, 0 = C3.
  localparam logic [2:0] H_COL [7] = '{3'b111, 3'b110, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b001};

  // Does original output i (0..3) take part in check c (0 = C1, 1 = C2, 2 = C3)?
  function automatic logic in_check(input int unsigned i, input int unsigned c);
    return H_COL[i][2-c];
  endfunction

endpackage
