// offset_fuse: behavioural model of the offset fuse word.
//
// Behavioural model (kind: behavioural_model) of the process-specific
// non-volatile word that holds the converter's offset correction term.  It
// has 14 inputs as in the design: a 13-bit two's-complement value and a write
// line.  Blowing fuses only sets bits, so a write ORs the value in; the
// unprogrammed word is zero.  The write line is sampled on the rising edge of
// clk, a choice of this model.  The stored value is read continuously by the
// correction adder.
module offset_fuse
  import adc_pkg::*;
(
  input  logic                clk,
  input  logic                wr,
  input  logic [OFFSET_W-1:0] value,
  output logic [OFFSET_W-1:0] offset
);
  logic [OFFSET_W-1:0] fuses;

  initial fuses = '0;

  always @(posedge clk)
    if (wr) fuses <= fuses | value;

  assign offset = fuses;
endmodule
