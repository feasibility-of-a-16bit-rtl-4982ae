// cal_dsp: factory calibration controller that talks to the converter
// through its 16 data pins and the CAL pin.
//
// What it does: after `start` it raises CAL and runs the calibration of the
// first pipeline stage.
//   1. Base case: capacitor-measurement mode with CLK high and address 0,
//      so no first-stage capacitor is forced high; the average of the 8 LSB
//      readings is A.
//   2. For m = 1..32: capacitor-measurement mode with CLK low and bus
//      address m-1, which forces capacitor m high; the average is B.  The
//      measured step is A - B = 8192 + Error(m), so Error(m) is (A - B)
//      rounded and read modulo 256 as a signed number.  The value is
//      saturated to the 7-bit fuse range and written at once to fuse
//      address m-1 with a CLK pulse (setup, high, low, one sample each).
//   3. Offset: offset-measurement mode (correction now active) while the
//      test set holds the input at mid-scale (output `vin_mid` high); the
//      average of the 13 LSB readings, minus OFS_REF (the 13 LSBs of the
//      ideal code of that input, 0 for mid-scale), is written to the offset
//      fuse with a CLK pulse.
//   4. CAL is released and `done` is raised.
// Each measurement waits SETTLE samples after the pins change (the
// converter needs three sample periods to show a new condition) and then
// averages 2^AVG_LOG2 readings.  Readings are a window of the low 8 or 13
// bits of the code, so each reading is unwrapped against the first one of
// its series (differences taken modulo the window, as signed numbers);
// the average keeps AVG_LOG2 fraction bits and is rounded only at the end.
//
// Interface: clk is the converter's phase clock and ph1 its phase-1
// enable; one reading is taken in every phase-1 cycle, when the pins carry
// a fresh code.  pin_drv/pin_oe are the controller's pin drivers, pin_in
// the levels it sees; only pins 12:0 are read, since pins 15:13 are the
// controller's own control outputs.  busy is high from start to done.
//
// The measurement sequence (base case, one capacitor at a time, error =
// step minus one first-stage LSB, offset measured after the capacitors,
// averaging by 1024) follows the design.  Writing each fuse right after its
// measurement instead of storing all 32 errors first, the settling time,
// the saturation of errors that do not fit 7 bits, and the mid-scale
// offset input are this implementation's choices.
module cal_dsp
  import adc_pkg::*;
#(
  parameter int          AVG_LOG2 = 10,   // 1024 readings per measurement
  parameter int          SETTLE   = 8,    // samples skipped after a pin change
  parameter logic [12:0] OFS_REF  = '0    // 13 LSBs of the ideal offset-measurement code
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ph1,
  input  logic              start,
  input  logic [OUT_W-1:0]  pin_in,
  output logic [OUT_W-1:0]  pin_drv,
  output logic [OUT_W-1:0]  pin_oe,
  output logic              cal,
  output logic              vin_mid,   // test set must apply a mid-scale input
  output logic              busy,
  output logic              done
);
  localparam int OFS_IDX = FUSE_WORDS + 1;        // measurement index of the offset
  localparam int VAL_W   = OFFSET_W + AVG_LOG2 + 2;
  localparam int CNT_W   = AVG_LOG2 + 1;

  typedef enum logic [2:0] {
    S_IDLE, S_SETTLE, S_ACC, S_CALC, S_WSET, S_WHI, S_WLO, S_DONE
  } state_e;

  state_e                  st;
  logic [5:0]              idx;      // 0 base case, 1..32 capacitors, 33 offset
  logic [CNT_W-1:0]        cnt;
  logic [OFFSET_W-1:0]     ref_rd;   // first reading of the series
  logic signed [VAL_W-1:0] acc;      // sum of unwrapped differences
  logic signed [VAL_W-1:0] a_val;    // base case, AVG_LOG2 fraction bits
  logic [OFFSET_W-1:0]     wdata;    // word written in the next pulse

  logic is_ofs;
  assign is_ofs = (idx == 6'(OFS_IDX));

  // current reading and its difference to the first one, as a signed number
  logic [OFFSET_W-1:0]     rd;
  logic signed [VAL_W-1:0] delta;
  always_comb begin
    rd = is_ofs ? pin_in[OFFSET_W-1:0] : {5'b0, pin_in[7:0]};
    if (is_ofs) delta = VAL_W'($signed(OFFSET_W'(rd - ref_rd)));
    else        delta = VAL_W'($signed(8'(rd - ref_rd)));
  end

  // average of the series and the word derived from it
  logic signed [VAL_W-1:0] val, diff, rnd;
  logic signed [7:0]       e8;
  logic [FUSE_W-1:0]       e7;
  always_comb begin
    val  = (VAL_W'(ref_rd) <<< AVG_LOG2) + acc;
    diff = is_ofs ? val : a_val - val;
    rnd  = (diff + (VAL_W'(1) <<< (AVG_LOG2 - 1))) >>> AVG_LOG2;
    e8   = rnd[7:0];
    if (e8 > 8'sd63)       e7 = 7'h3f;
    else if (e8 < -8'sd64) e7 = 7'h40;
    else                   e7 = e8[6:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; cnt <= '0; ref_rd <= '0;
      acc <= '0; a_val <= '0; wdata <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_SETTLE; idx <= '0; cnt <= '0;
        end
        S_SETTLE: if (ph1) begin
          if (cnt == CNT_W'(SETTLE - 1)) begin st <= S_ACC; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_ACC: if (ph1) begin
          if (cnt == '0) begin ref_rd <= rd; acc <= '0; end
          else acc <= acc + delta;
          if (cnt == CNT_W'((1 << AVG_LOG2) - 1)) st <= S_CALC;
          cnt <= cnt + 1'b1;
        end
        S_CALC: begin
          cnt <= '0;
          if (idx == '0) begin
            a_val <= val; idx <= 6'd1; st <= S_SETTLE;
          end else begin
            wdata <= is_ofs ? OFFSET_W'(rnd - VAL_W'(OFS_REF))
                            : {(idx[4:0] - 5'd1), 1'b0, e7};
            st <= S_WSET;
          end
        end
        S_WSET: if (ph1) st <= S_WHI;
        S_WHI:  if (ph1) st <= S_WLO;
        S_WLO:  if (ph1) begin
          if (is_ofs) st <= S_DONE;
          else begin idx <= idx + 1'b1; cnt <= '0; st <= S_SETTLE; end
        end
        S_DONE: if (!start) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // pin drivers: {OFF, CLK, INOUT, 13 data pins}
  logic writing;
  assign writing = (st == S_WSET) || (st == S_WHI) || (st == S_WLO);
  always_comb begin
    pin_drv = '0;
    pin_oe  = '0;
    cal     = (st != S_IDLE) && (st != S_DONE);
    if (cal) begin
      pin_oe[15:13] = 3'b111;
      pin_drv[15]   = is_ofs;                           // OFF
      if (writing) begin
        pin_drv[14]   = (st == S_WHI);                  // CLK strobe
        pin_drv[13]   = 1'b1;                           // INOUT: write
        pin_drv[12:0] = wdata;
        pin_oe[12:0]  = '1;
      end else if (!is_ofs) begin
        pin_drv[14]   = (idx == '0);                    // CLK high: no capacitor
        pin_drv[12:8] = (idx == '0) ? 5'd0 : idx[4:0] - 5'd1;
        pin_oe[12:8]  = '1;
      end
    end
  end

  assign vin_mid = is_ofs && ((st == S_SETTLE) || (st == S_ACC) || (st == S_CALC));
  assign busy    = cal;
  assign done    = (st == S_DONE);
endmodule
