// correction_register: correction adder and correction register.
//
// In every phase-1 cycle the register loads the selected correction term
// minus the offset-fuse value, both sign-extended two's complement, so that
// it holds the total correction for the sample whose raw code is loaded in
// the same cycle.  The register is 14 bits wide (11-bit term, 13-bit offset),
// large enough never to overflow.  During capacitor measurement in
// calibration mode the clear input forces the register to zero, so the raw
// measurement reaches the output uncorrected.  The design clears the register
// asynchronously; here the clear is applied at every clock edge while it is
// high and takes priority over the load, which gives the same result one
// phase later and keeps the block synchronous.
module correction_register
  import adc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ph1,
  input  logic                       clr,
  input  logic signed [CTERM_W-1:0]  sel_term,
  input  logic        [OFFSET_W-1:0] offset,     // two's complement
  output logic signed [CREG_W-1:0]   corr
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   corr <= '0;
    else if (clr) corr <= '0;
    else if (ph1) corr <= CREG_W'(sel_term) - CREG_W'($signed(offset));
endmodule
