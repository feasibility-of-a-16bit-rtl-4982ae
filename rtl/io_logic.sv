// io_logic: output formatting and calibration interface.
//
// Normal mode (cal low): all 16 pins are outputs carrying the calibrated
// code truncated from 18 to 16 bits (bits 17:2) and clamped to 0..65535: a
// negative code gives 0, a code of 2^18 or more gives 65535.
//
// Calibration mode (cal high): pins 15, 14 and 13 become the DSP's control
// inputs OFF, CLK and INOUT, and the 13 low pins carry data:
//   INOUT=1, OFF=0  fuse write: pins 12:8 address, pins 6:0 value; the fuse
//                   write strobe is CLK.
//   INOUT=1, OFF=1  offset write: pins 12:0 are the offset value, sent to the
//                   offset fuse as {addr, lsbs}; the write strobe is CLK.
//   INOUT=0, OFF=0  capacitor measurement: pins 12:8 are a bus address a,
//                   the ADC drives pins 7:0 with the 8 LSBs of the output
//                   code, and the capacitor address sent to the line decoder
//                   is a when CLK is high and a+1 when CLK is low.
//   INOUT=0, OFF=1  offset measurement: the ADC drives pins 12:0 with the 13
//                   LSBs of the corrected code.
// clrreg (= cal and not OFF) zeroes the correction register and switches the
// first MDAC to DSP control (calmdac).  The modes, pin assignment and strobes
// follow the design; driving addr and lsbs to zero where the design leaves
// them floating, and splitting the bidirectional pins into data_in, data_out
// and a per-pin output enable for the pad cells, are this implementation's
// choices.  Purely combinational.
module io_logic
  import adc_pkg::*;
(
  input  logic                    cal,
  input  logic [OUT_W-1:0]        data_in,   // pin levels
  input  logic signed [RAW_W-1:0] word,      // calibrated code
  output logic [OUT_W-1:0]        data_out,  // pin drive values
  output logic [OUT_W-1:0]        data_oe,   // 1: ADC drives the pin
  output logic [ADDR_W-1:0]       addr,      // fuse / capacitor address, offset MSBs
  output logic [FUSE_W-1:0]       lsbs,      // fuse value, offset LSBs
  output logic                    wrfuse,
  output logic                    wroff,
  output logic                    clrreg,
  output io_mode_e                mode
);
  logic off_pin, clk_pin, io_pin;
  assign off_pin = data_in[15];
  assign clk_pin = data_in[14];
  assign io_pin  = data_in[13];

  assign wroff  = cal & io_pin & clk_pin &  off_pin;
  assign wrfuse = cal & io_pin & clk_pin & ~off_pin;
  assign clrreg = cal & ~off_pin;

  always_comb begin
    if (!cal)         mode = IO_NORMAL;
    else if (io_pin)  mode = off_pin ? IO_WR_OFFSET : IO_WR_FUSE;
    else              mode = off_pin ? IO_MEAS_OFFS : IO_MEAS_CAP;
  end

  always_comb begin
    data_out = '0;
    data_oe  = '0;
    addr     = '0;
    lsbs     = '0;
    unique case (mode)
      IO_NORMAL: begin
        data_oe = '1;
        if (word < 0)                              data_out = '0;
        else if (word >= (RAW_W'(1) << CODE_BITS)) data_out = '1;
        else data_out = word[CODE_BITS-1 -: OUT_W];
      end
      IO_WR_FUSE: begin
        addr = {1'b0, data_in[12:8]};
        lsbs = data_in[6:0];
      end
      IO_WR_OFFSET: begin
        addr = data_in[12:7];
        lsbs = data_in[6:0];
      end
      IO_MEAS_CAP: begin
        addr          = {1'b0, data_in[12:8]} + (clk_pin ? 6'd0 : 6'd1);
        data_oe[7:0]  = '1;
        data_out[7:0] = word[7:0];
      end
      IO_MEAS_OFFS: begin
        data_oe[12:0]  = '1;
        data_out[12:0] = word[12:0];
      end
      default: ;
    endcase
  end
endmodule
