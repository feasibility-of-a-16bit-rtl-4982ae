// correction_selector: 33-to-1 selector of the correction term.
//
// The delayed first-stage flash code tells which of the 33 residue segments
// the sample fell in.  The code is the ROM value n-2 of flash level n
// (-2..30, 6-bit two's complement), so the segment index is code+2 and the
// selector returns Correctionterm(code+2).  Codes outside -2..30 cannot come
// from the flash and select zero.  Purely combinational.
module correction_selector
  import adc_pkg::*;
(
  input  logic signed [CTERM_W-1:0] term [SEG_N],
  input  logic        [FLASH_W[0]-1:0] code,    // delayed first-stage ROM code
  output logic signed [CTERM_W-1:0] sel_term
);
  localparam logic [FLASH_W[0]-1:0] CODE_OFS = FLASH_W[0]'(FLASH_OFS[0]);

  logic [FLASH_W[0]-1:0] seg;   // segment index, code - (-2), modulo 64

  always_comb begin
    seg = code - CODE_OFS;
    if (seg < FLASH_W[0]'(SEG_N)) sel_term = term[seg];
    else                          sel_term = '0;
  end
endmodule
