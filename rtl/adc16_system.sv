// adc16_system: the converter's digital section together with the factory
// calibration controller that drives it through the pins.
//
// This is the arrangement in which the calibration is carried out: the
// controller (cal_dsp) sits on the 16 data pins and the CAL pin of the
// converter (adc16_top).  After `start` it measures the 32 first-stage
// capacitor errors and the offset, programs the fuses and releases CAL;
// from then on the pins carry calibrated 16-bit codes.  The controller runs
// on the converter's phase clock and reads once per sample.
//
// The shared pins are modelled without a tri-state bus: each side reads
// what the other side drives (the converter sees the controller's driven
// bits, the controller sees the converter's driven bits), and `code` gives
// the resulting pin levels.  The converter's pin directions depend on the
// control pins and the controller's on its own state only, so the two
// never drive the same pin; an assertion checks it.
//
// Interface: the converter's analog side (comparator thermometer codes in,
// first-MDAC switch controls, calmdac and the phase enables out) is brought
// out unchanged.  `vin_mid` asks the test set for a mid-scale input during
// the offset measurement.  Timing: calibration takes
// 34 * (SETTLE + 1024) + 99 sample periods with the default averaging;
// output latency in normal mode is that of adc16_top (3 sample periods).
// Putting the controller and the converter in one module is this
// implementation's choice; in the design the controller is external test
// equipment connected to the pins.
module adc16_system
  import adc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // begin factory calibration
  input  logic [31:0]      therm0,
  input  logic [31:0]      therm1,
  input  logic [15:0]      therm2,
  input  logic [15:0]      therm3,
  input  logic [15:0]      therm4,
  output logic [OUT_W-1:0] code,       // data pin levels
  output logic [31:0]      mdac1_sw,
  output logic             calmdac,
  output logic             ph1,
  output logic             ph2,
  output logic             vin_mid,
  output logic             busy,
  output logic             done
);
  logic             cal;
  logic [OUT_W-1:0] adc_out, adc_oe, dsp_drv, dsp_oe;

  adc16_top u_adc (
    .clk, .rst_n, .therm0, .therm1, .therm2, .therm3, .therm4,
    .cal, .data_in(dsp_drv & dsp_oe), .data_out(adc_out), .data_oe(adc_oe),
    .mdac1_sw, .calmdac, .ph1, .ph2);

  cal_dsp u_dsp (
    .clk, .rst_n, .ph1, .start, .pin_in(adc_out & adc_oe),
    .pin_drv(dsp_drv), .pin_oe(dsp_oe), .cal, .vin_mid, .busy, .done);

  assign code = (adc_out & adc_oe) | (dsp_drv & dsp_oe);

  assert property (@(posedge clk) (adc_oe & dsp_oe) == '0);
endmodule
