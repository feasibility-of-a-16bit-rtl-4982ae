// pre_adder: bank of running-sum adders of the error coefficients.
//
// Implements Correctionterm(i) = Error(1) + ... + Error(i) for i = 1..32 with
// Correctionterm(0) = 0: the correction the calibration adds to every code
// whose first-stage flash level (residue segment) is i.  The adders form a
// chain, each adding the next sign-extended 7-bit fuse word to the previous
// sum.  Sums are carried in CTERM_W = 11 bits as in the design; a sum outside
// -1024..1023 wraps, which the design accepts because the coefficients of a
// real part are small and of random sign.  Purely combinational.
module pre_adder
  import adc_pkg::*;
(
  input  logic        [FUSE_W-1:0]  err  [FUSE_WORDS],   // err[j-1] = Error(j)
  output logic signed [CTERM_W-1:0] term [SEG_N]         // term[i] = Correctionterm(i)
);
  always_comb begin
    term[0] = '0;
    for (int i = 1; i < SEG_N; i++)
      term[i] = term[i-1] + CTERM_W'($signed(err[i-1]));
  end
endmodule
