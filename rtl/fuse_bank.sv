// fuse_bank: behavioural model of the electrically writable fuse bank.
//
// Behavioural model (kind: behavioural_model) of a process-specific
// non-volatile memory: 32 words of 7 fuses that hold the two's-complement
// error coefficients Error(1)..Error(32) of the first-stage capacitors.  The
// bank has the 14 inputs the design gives it: a 7-bit value, a 6-bit address
// and a write line.  Bus address a (0..31) holds Error(a+1), the coefficient
// of unit capacitor a+1; addresses above 31 are not backed by fuses and are
// ignored.  (The same bus address selects capacitor a+1 for measurement, see
// io_logic.)  A fuse can
// only be blown, so a write ORs the value into the addressed word; the
// unprogrammed state is all zeros, which the model sets at time zero.  The
// write line is sampled on the rising edge of clk (a real fuse macro is
// programmed by a timed pulse; the sampling is this model's choice).  All 32
// words are read continuously by the pre-adders.
module fuse_bank
  import adc_pkg::*;
(
  input  logic                     clk,
  input  logic                     wr,      // program strobe
  input  logic [ADDR_W-1:0]        addr,    // 0..31
  input  logic [FUSE_W-1:0]        value,   // bits to blow
  output logic [FUSE_W-1:0]        word [FUSE_WORDS]  // word[j-1] = Error(j)
);
  logic [FUSE_W-1:0] fuses [FUSE_WORDS];

  initial for (int i = 0; i < FUSE_WORDS; i++) fuses[i] = '0;

  always @(posedge clk)
    if (wr && addr < ADDR_W'(FUSE_WORDS))
      fuses[addr[$clog2(FUSE_WORDS)-1:0]] <= fuses[addr[$clog2(FUSE_WORDS)-1:0]] | value;

  assign word = fuses;
endmodule
