// line_decoder: binary to single line-select decoder.
//
// During calibration the DSP picks one unit capacitor of the first MDAC whose
// reference switch is forced to the high reference.  Address a in 1..32
// raises line a-1 (capacitor C_a); address 0 raises no line, which is the
// base-case measurement with every switch at the low reference; addresses
// above 32 raise no line either.  Purely combinational.
module line_decoder
  import adc_pkg::*;
(
  input  logic [ADDR_W-1:0]     addr,
  output logic [FUSE_WORDS-1:0] lines
);
  always_comb begin
    lines = '0;
    for (int unsigned i = 0; i < FUSE_WORDS; i++)
      lines[i] = (addr == ADDR_W'(i + 1));
  end
endmodule
