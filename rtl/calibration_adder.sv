// calibration_adder: adds the correction to the raw code.
//
// In every phase-2 cycle the register loads raw + corr, the raw
// error-corrected code plus the sign-extended correction register, in RAW_W
// bits two's complement.  Both operands were loaded in the preceding phase-1
// cycle from the same sample, so the calibrated code follows the raw code by
// one phase.  Over- and under-range results are left for the output logic to
// clamp.
module calibration_adder
  import adc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ph2,
  input  logic signed [RAW_W-1:0]  raw,
  input  logic signed [CREG_W-1:0] corr,
  output logic signed [RAW_W-1:0]  sum
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   sum <= '0;
    else if (ph2) sum <= raw + RAW_W'(corr);
endmodule
