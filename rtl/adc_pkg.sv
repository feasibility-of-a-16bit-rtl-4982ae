// adc_pkg: widths, stage constants and shared types of the digital section of
// a 16-bit, 5-5-4-4-4 pipeline ADC with factory-programmed DNL calibration of
// the first stage.
//
// Raw codes are 18-bit numbers (0..262143) built by overlap-adding the five
// flash words; the first-stage word carries weight 2^13, the following ones
// 2^9, 2^6, 2^3 and 2^0.  The flash ROM offsets below reproduce the coding
// table of the design (stage 1: -2..30, stage 2: 14..46, stages 3/4: 6..22,
// stage 5: 8..24), so that the middle level of every flash adds up to 2^17.
// Word widths (6/6/5/5/5-bit flash words, 7-bit fuses, 11-bit correction
// terms, 13-bit offset, 14-bit correction register, 20-bit sums) follow the
// design's reference description.
package adc_pkg;

  localparam int unsigned NSTAGES    = 5;
  localparam int unsigned RAW_W      = 20;  // width of raw / calibrated sums
  localparam int unsigned CODE_BITS  = 18;  // resolution before truncation
  localparam int unsigned OUT_W      = 16;  // output word
  localparam int unsigned FUSE_WORDS = 32;  // one error coefficient per unit capacitor
  localparam int unsigned FUSE_W     = 7;   // two's-complement error coefficient
  localparam int unsigned CTERM_W    = 11;  // pre-added correction term
  localparam int unsigned OFFSET_W   = 13;  // offset fuse word
  localparam int unsigned CREG_W     = 14;  // correction register
  localparam int unsigned ADDR_W     = 6;   // fuse / capacitor address bus
  localparam int unsigned SEG_N      = 33;  // residue segments of the first stage

  // comparators per flash, code width, ROM offset and weight (log2) per stage
  localparam int unsigned FLASH_COMPS [NSTAGES] = '{32, 32, 16, 16, 16};
  localparam int unsigned FLASH_W     [NSTAGES] = '{6, 6, 5, 5, 5};
  localparam int          FLASH_OFS   [NSTAGES] = '{-2, 14, 6, 6, 8};
  localparam int unsigned FLASH_SHIFT [NSTAGES] = '{13, 9, 6, 3, 0};

  // operating mode of the input/output logic, decoded from CAL, OFF and INOUT
  typedef enum logic [2:0] {
    IO_NORMAL     = 3'd0,  // CAL low: clamped 16-bit output
    IO_WR_FUSE    = 3'd1,  // DSP drives fuse address and value
    IO_WR_OFFSET  = 3'd2,  // DSP drives the 13-bit offset value
    IO_MEAS_CAP   = 3'd3,  // DSP drives capacitor address, ADC drives 8 LSBs
    IO_MEAS_OFFS  = 3'd4   // ADC drives 13 LSBs of the corrected code
  } io_mode_e;

endpackage
