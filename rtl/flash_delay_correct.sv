// flash_delay_correct: flash word alignment and digital error correction.
//
// The five flashes of the 5-5-4-4-4 pipeline decide on the same sample half
// a conversion period apart: flash s (s = 0 first stage .. 4 last) presents
// its word in phase cycle t+s when flash 0 presented its word in cycle t.
// Flash 0 comes in during phase 1.  Each word passes 4-s delay registers of
// one phase each (in the design these are latches transparent on alternate
// phases: flash 0 ph1, ph2, ph1, ph2; flash 1 ph2, ph1, ph2; flash 2 ph1,
// ph2; flash 3 ph2; flash 4 none), so all five meet in cycle t+4, a phase-1
// cycle, at the end of which the raw register loads their overlapped sum:
//     raw = f0*2^13 + f1*2^9 + f2*2^6 + f3*2^3 + f4
// Adjacent words overlap by two bits, which is the digital error correction
// of the redundant stages.  The first-stage word is two's complement (-2..30)
// and is sign-extended, the others are unsigned; raw is a signed RAW_W-bit
// number whose in-range values are 0..2^18-1.  The delayed first-stage word
// is also output as `sel`, the selector input of the correction term; it is
// valid in cycle t+4, so a register loading in that phase-1 cycle (the
// correction register) sees the same sample as the raw register.
// Latency: sel is valid in cycle t+4, raw from cycle t+5.
// The delay depths and the overlap weights follow the design; replacing the
// phase-transparent latches by edge-triggered registers clocked every phase
// cycle is this implementation's choice.
module flash_delay_correct
  import adc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ph1,
  input  logic [FLASH_W[0]-1:0]     flash0,
  input  logic [FLASH_W[1]-1:0]     flash1,
  input  logic [FLASH_W[2]-1:0]     flash2,
  input  logic [FLASH_W[3]-1:0]     flash3,
  input  logic [FLASH_W[4]-1:0]     flash4,
  output logic signed [RAW_W-1:0]   raw,     // error-corrected raw code
  output logic [FLASH_W[0]-1:0]     sel      // delayed first-stage code, cycle t+4
);
  logic [FLASH_W[0]-1:0] f0_d1, f0_d2, f0_d3, f0_d4;
  logic [FLASH_W[1]-1:0] f1_d1, f1_d2, f1_d3;
  logic [FLASH_W[2]-1:0] f2_d1, f2_d2;
  logic [FLASH_W[3]-1:0] f3_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f0_d1 <= '0; f0_d2 <= '0; f0_d3 <= '0; f0_d4 <= '0;
      f1_d1 <= '0; f1_d2 <= '0; f1_d3 <= '0;
      f2_d1 <= '0; f2_d2 <= '0;
      f3_d1 <= '0;
    end else begin
      f0_d1 <= flash0; f0_d2 <= f0_d1; f0_d3 <= f0_d2; f0_d4 <= f0_d3;
      f1_d1 <= flash1; f1_d2 <= f1_d1; f1_d3 <= f1_d2;
      f2_d1 <= flash2; f2_d2 <= f2_d1;
      f3_d1 <= flash3;
    end
  end

  logic signed [RAW_W-1:0] sum;
  always_comb begin
    sum = (RAW_W'($signed(f0_d4)) <<< FLASH_SHIFT[0])
        + (RAW_W'(f1_d3)          <<  FLASH_SHIFT[1])
        + (RAW_W'(f2_d2)          <<  FLASH_SHIFT[2])
        + (RAW_W'(f3_d1)          <<  FLASH_SHIFT[3])
        +  RAW_W'(flash4);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   raw <= '0;
    else if (ph1) raw <= sum;

  assign sel = f0_d4;
endmodule
