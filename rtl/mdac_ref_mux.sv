// mdac_ref_mux: reference-switch source selection of the first MDAC.
//
// Each of the 32 unit capacitors of the first MDAC is switched to the high
// or the low reference during the amplify phase.  In normal operation the
// first flash's thermometer code drives the switches (capacitor i+1 high when
// comparator i tripped).  In calibration measurement (calmdac high) the
// switches follow the DSP-selected line instead, so that the DSP controls one
// switch at a time.  Purely combinational; the switch drivers are analog.
module mdac_ref_mux
  import adc_pkg::*;
(
  input  logic                  calmdac,
  input  logic [FUSE_WORDS-1:0] therm,    // first-flash thermometer code
  input  logic [FUSE_WORDS-1:0] lines,    // DSP line select
  output logic [FUSE_WORDS-1:0] sw_high   // 1: capacitor to high reference
);
  assign sw_high = calmdac ? lines : therm;
endmodule
