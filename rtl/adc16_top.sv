// adc16_top: digital section of a 16-bit, 3 MS/s, 5-5-4-4-4 pipeline ADC
// with factory digital calibration of the first stage.
//
// Data path: the five flash comparator arrays (32, 32, 16, 16, 16
// comparators) deliver latched thermometer codes; flash_encoder turns each
// into its ROM code, flash_delay_correct aligns the five words of one sample
// and overlap-adds them into an 18-bit raw code, the pre-adders turn the 32
// fuse-stored capacitor error coefficients into 33 running sums, the
// selector picks the sum of the sample's first-stage segment, the
// correction register subtracts the offset-fuse value from it, and the
// calibration adder adds the result to the raw code.  io_logic clamps and
// truncates the sum to the 16 output pins.
//
// Calibration path: with cal high an external DSP uses three of the 16 pins
// as control inputs and the other 13 as a data bus (see io_logic) to force
// single first-MDAC reference switches high (line_decoder, mdac_ref_mux),
// read back raw measurements, and program the fuse bank and the offset fuse.
//
// Timing: clk runs at twice the sample rate, one cycle per clock phase
// (phase_gen).  Flash s of a sample is presented s cycles after flash 0,
// which comes in a phase-1 cycle t; the pins carry that sample's output code
// from cycle t+6 to t+7, three conversion periods of latency, and a new code
// every second cycle.  The first MDAC switch controls mdac1_sw follow the
// first flash's thermometer code combinationally (or the DSP line in
// calibration).  Pads, comparators, MDACs and references are analog and sit
// outside this module.
module adc16_top
  import adc_pkg::*;
(
  input  logic                  clk,        // phase clock, 2x sample rate
  input  logic                  rst_n,
  input  logic [31:0]           therm0,     // stage-1 flash comparators
  input  logic [31:0]           therm1,     // stage-2 flash comparators
  input  logic [15:0]           therm2,     // stage-3 flash comparators
  input  logic [15:0]           therm3,     // stage-4 flash comparators
  input  logic [15:0]           therm4,     // stage-5 flash comparators
  input  logic                  cal,        // CAL pin
  input  logic [OUT_W-1:0]      data_in,    // data pin levels
  output logic [OUT_W-1:0]      data_out,   // data pin drive values
  output logic [OUT_W-1:0]      data_oe,    // data pin output enables
  output logic [31:0]           mdac1_sw,   // first MDAC: capacitor to high reference
  output logic                  calmdac,    // first MDAC in calibration sampling mode
  output logic                  ph1,        // phase 1 indicator for the analog section
  output logic                  ph2         // phase 2 indicator
);
  // clock phases
  phase_gen u_phase (.clk, .rst_n, .ph1, .ph2);

  // flash ROM encoders
  logic [FLASH_W[0]-1:0] f0;
  logic [FLASH_W[1]-1:0] f1;
  logic [FLASH_W[2]-1:0] f2;
  logic [FLASH_W[3]-1:0] f3;
  logic [FLASH_W[4]-1:0] f4;

  flash_encoder #(.COMPS(FLASH_COMPS[0]), .CODE_W(FLASH_W[0]), .OFFSET(FLASH_OFS[0])) u_enc0 (.therm(therm0), .code(f0));
  flash_encoder #(.COMPS(FLASH_COMPS[1]), .CODE_W(FLASH_W[1]), .OFFSET(FLASH_OFS[1])) u_enc1 (.therm(therm1), .code(f1));
  flash_encoder #(.COMPS(FLASH_COMPS[2]), .CODE_W(FLASH_W[2]), .OFFSET(FLASH_OFS[2])) u_enc2 (.therm(therm2), .code(f2));
  flash_encoder #(.COMPS(FLASH_COMPS[3]), .CODE_W(FLASH_W[3]), .OFFSET(FLASH_OFS[3])) u_enc3 (.therm(therm3), .code(f3));
  flash_encoder #(.COMPS(FLASH_COMPS[4]), .CODE_W(FLASH_W[4]), .OFFSET(FLASH_OFS[4])) u_enc4 (.therm(therm4), .code(f4));

  // delay and digital error correction
  logic signed [RAW_W-1:0] raw;
  logic [FLASH_W[0]-1:0]   seg_code;
  flash_delay_correct u_dec (
    .clk, .rst_n, .ph1,
    .flash0(f0), .flash1(f1), .flash2(f2), .flash3(f3), .flash4(f4),
    .raw, .sel(seg_code));

  // input/output logic
  logic signed [RAW_W-1:0] cal_sum;
  logic [ADDR_W-1:0]       addr;
  logic [FUSE_W-1:0]       lsbs;
  logic                    wrfuse, wroff, clrreg;
  io_mode_e                mode;
  io_logic u_io (
    .cal, .data_in, .word(cal_sum), .data_out, .data_oe,
    .addr, .lsbs, .wrfuse, .wroff, .clrreg, .mode);

  // non-volatile coefficient storage
  logic [FUSE_W-1:0]   err [FUSE_WORDS];
  logic [OFFSET_W-1:0] offset;
  fuse_bank   u_fuses  (.clk, .wr(wrfuse), .addr, .value(lsbs), .word(err));
  offset_fuse u_offset (.clk, .wr(wroff), .value({addr, lsbs}), .offset);

  // pre-adders, selector, correction register, calibration adder
  logic signed [CTERM_W-1:0] term [SEG_N];
  logic signed [CTERM_W-1:0] sel_term;
  logic signed [CREG_W-1:0]  corr;
  pre_adder           u_pre  (.err, .term);
  correction_selector u_sel  (.term, .code(seg_code), .sel_term);
  correction_register u_creg (.clk, .rst_n, .ph1, .clr(clrreg), .sel_term, .offset, .corr);
  calibration_adder   u_cadd (.clk, .rst_n, .ph2, .raw, .corr, .sum(cal_sum));

  // first MDAC reference switch control
  logic [FUSE_WORDS-1:0] lines;
  line_decoder u_ldec (.addr, .lines);
  mdac_ref_mux u_rmux (.calmdac(clrreg), .therm(therm0), .lines, .sw_high(mdac1_sw));
  assign calmdac = clrreg;

  // in normal mode every pin is an output; in calibration the control pins never are
  assert property (@(posedge clk)
    (mode == IO_NORMAL) ? (data_oe == '1) : (data_oe[15:13] == 3'b000));
endmodule
