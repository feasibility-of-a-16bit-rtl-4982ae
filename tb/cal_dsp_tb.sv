// cal_dsp_tb: self-checking testbench of the calibration controller.
//
// A pin-level responder stands in for the converter.  From the levels the
// controller drives it works out what the converter would put on its pins,
// three samples later (the converter's latency):
//   capacitor measurement (CAL, OFF=0, INOUT=0): line select n = address
//   (CLK high) or address+1 (CLK low); the code is BASE minus
//   8192 + e[n] when n > 0, plus noise; pins 7:0 carry its 8 LSBs;
//   offset measurement (OFF=1, INOUT=0): the code is mid-scale (2^17) plus
//   the offset OFS plus noise; pins 12:0 carry its 13 LSBs.
// The noise is triangular, -8..+8 codes.  On every rising CLK with INOUT=1
// the responder records a fuse write (address 12:8, value 6:0) or an offset
// write (12:0).  Capacitor errors are random in -60..60, except capacitor 7
// at +100 and capacitor 20 at -90, which must saturate to +63 and -64.
// Checks: every fuse word written exactly once with the expected value, one
// offset write of OFS, CAL released and done raised, vin_mid only during
// the offset measurement, no pin driven by both sides, and the duration: 34
// series of SETTLE + 1024 samples plus 33 three-sample write pulses, within
// a few samples.
module cal_dsp_tb;
  import adc_pkg::*;

  localparam int SETTLE = 8;      // the controller's default
  localparam int BASE   = 100000;
  localparam int OFS    = -45;

  logic clk = 0, rst_n = 0, ph1 = 0, start = 0;
  logic [15:0] pin_in, pin_drv, pin_oe;
  logic cal, vin_mid, busy, done;

  cal_dsp dut (.clk, .rst_n, .ph1, .start, .pin_in,
           .pin_drv, .pin_oe, .cal, .vin_mid, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) ph1 <= rst_n ? ~ph1 : 1'b0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int e [1:32];
  int fuse_val [32];
  int fuse_cnt [32];
  int ofs_val, ofs_cnt = 0;
  logic [15:0] adc_oe;
  logic [15:0] adc_pipe [3];
  logic [15:0] adc_now;
  logic        prev_clk = 0;
  int          n_noise_nonzero = 0;

  // what the converter drives for the current pin levels (before latency)
  function automatic logic [15:0] respond(logic [15:0] p, logic c);
    int code, n, noise;
    noise = int'($urandom_range(0, 8)) + int'($urandom_range(0, 8)) - 8;
    if (noise != 0) n_noise_nonzero++;
    if (!c || p[13]) return '0;
    if (p[15]) begin
      code = 131072 + OFS + noise;
      return 16'(code & 13'h1fff);
    end
    n = int'(p[12:8]) + (p[14] ? 0 : 1);
    code = BASE + noise - ((n == 0) ? 0 : 8192 + e[n]);
    return 16'(code & 8'hff);
  endfunction

  always_comb begin
    adc_oe = '0;
    if (cal && !pin_drv[13]) adc_oe = pin_drv[15] ? 16'h1fff : 16'h00ff;
  end
  assign pin_in = adc_now;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ph1) begin
        adc_now     <= adc_pipe[2];
        adc_pipe[2] <= adc_pipe[1];
        adc_pipe[1] <= adc_pipe[0];
        adc_pipe[0] <= respond(pin_drv & pin_oe, cal);
      end
      check((pin_oe & adc_oe) == '0, "no pin driven by both sides");
      if (vin_mid) check(cal && pin_drv[15] && !pin_drv[13], "vin_mid only in offset measurement");
      // write strobes
      if (cal && pin_drv[13] && pin_oe[14] && pin_drv[14] && !prev_clk) begin
        if (pin_drv[15]) begin
          ofs_val = int'($signed(pin_drv[12:0]));
          ofs_cnt++;
        end else begin
          fuse_val[pin_drv[12:8]] = int'($signed(pin_drv[6:0]));
          fuse_cnt[pin_drv[12:8]]++;
        end
      end
      prev_clk <= cal & pin_drv[14] & pin_drv[13];
    end
  end

  int t_start, t_done, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int i = 0; i < 3; i++) adc_pipe[i] = '0;
    adc_now = '0;
    for (int m = 1; m <= 32; m++) e[m] = int'($urandom_range(0, 120)) - 60;
    e[7] = 100; e[20] = -90;
    for (int a = 0; a < 32; a++) begin fuse_val[a] = 0; fuse_cnt[a] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (6) @(posedge clk);
    check(!cal && !busy && !done && pin_oe == '0, "idle before start");
    #1 start = 1;
    t_start = cyc;
    @(posedge done);
    t_done = cyc;
    #1 start = 0;
    repeat (4) @(posedge clk);
    check(!cal && pin_oe == '0, "CAL and pins released");
    for (int m = 1; m <= 32; m++) begin
      int exp_w;
      exp_w = (e[m] > 63) ? 63 : (e[m] < -64) ? -64 : e[m];
      check(fuse_cnt[m - 1] == 1, $sformatf("fuse %0d written %0d times", m - 1, fuse_cnt[m - 1]));
      check(fuse_val[m - 1] == exp_w,
            $sformatf("fuse %0d = %0d, expected %0d (error %0d)", m - 1, fuse_val[m - 1], exp_w, e[m]));
    end
    check(ofs_cnt == 1, "one offset write");
    check(ofs_val == OFS, $sformatf("offset %0d, expected %0d", ofs_val, OFS));
    check(n_noise_nonzero > 1000, "noise applied");
    begin
      int samples, expect_s;
      samples  = (t_done - t_start) / 2;
      expect_s = 34 * (SETTLE + 1024) + 33 * 3;
      $display("calibration took %0d samples, expected about %0d", samples, expect_s);
      check(samples >= expect_s && samples <= expect_s + 4, "calibration duration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
