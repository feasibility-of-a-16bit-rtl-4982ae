// flash_encoder: thermometer-to-binary ROM of one flash ADC.
//
// A flash with COMPS comparators resolves COMPS+1 levels.  The encoder counts
// the tripped comparators (level n, 0..COMPS) and outputs the stage's ROM code
// n + OFFSET in CODE_W-bit two's complement, reproducing the per-stage coding
// table of the design (stage 1: -2..30 in 6 bits, stage 2: 14..46 in 6 bits,
// stages 3 and 4: 6..22, stage 5: 8..24 in 5 bits).  Counting ones instead of
// locating the top transition is this implementation's choice: it is the
// simplest circuit giving the table and it tolerates single bubbles.  The
// block is purely combinational; the comparators themselves latch.
module flash_encoder #(
  parameter int unsigned COMPS  = 32,
  parameter int unsigned CODE_W = 6,
  parameter int          OFFSET = -2
) (
  input  logic [COMPS-1:0]  therm,  // comparator outputs, 1 = input above level
  output logic [CODE_W-1:0] code    // ROM code, two's complement
);
  localparam int unsigned CNT_W = $clog2(COMPS + 1);

  logic [CNT_W-1:0] level;

  always_comb begin
    level = '0;
    for (int unsigned i = 0; i < COMPS; i++)
      level = level + CNT_W'(therm[i]);
  end

  // modulo-2^CODE_W addition gives the two's-complement ROM value
  assign code = CODE_W'(level) + CODE_W'(OFFSET);
endmodule
