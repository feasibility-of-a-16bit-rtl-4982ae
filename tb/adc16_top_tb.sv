// adc16_top_tb: end-to-end factory calibration and conversion of the
// 16-bit pipeline ADC.
//
// The behavioural analog model (adc_frontend_model) supplies the comparator outputs:
// the first stage has 32 unit capacitors with random mismatch errors e_m
// (the step of capacitor m is 8192+e_m in 18-bit code units), a residue
// amplifier offset and random first-flash threshold errors (absorbed by the
// digital error correction); stages 2..5 are ideal.  Flash s of sample k is
// presented in phase cycle 2k+s; the first MDAC's residue uses the switch
// controls the design outputs in the cycle its flash decides, and in
// calibration sampling mode the MDAC samples the first decision level.
//
// A model of the external DSP then runs the calibration over the pins:
// measure the base case and the 32 capacitor steps (8 LSBs each, as the pin
// table allows; the step minus one first-stage LSB is the error
// coefficient), write the 32 fuse words, measure the offset with the
// correction active, write the offset fuse, and release CAL.  Before and
// after, an input ramp slightly wider than full scale is converted.  After
// calibration every output code must equal the ideal one,
// clamp(round(vin)/4), three conversion periods after the sample; before
// calibration the mismatch must be visible.  Every mechanism of the design
// is counted and must occur.  All parameters of the design are at their
// defaults.
module adc16_top_tb;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] therm0, therm1;
  logic [15:0] therm2, therm3, therm4;
  logic cal = 0;
  logic [15:0] data_in, data_out, data_oe;
  logic [31:0] mdac1_sw;
  logic calmdac, ph1, ph2;
  real  vin = 0.0;
  int   cyc, sample, n_flash_err, n_phase_err;

  // DSP pin drive
  logic [15:0] dsp_drv = 0, dsp_oe = 0;
  assign data_in = dsp_drv;

  adc16_top dut (.clk, .rst_n, .therm0, .therm1, .therm2, .therm3, .therm4,
                 .cal, .data_in, .data_out, .data_oe, .mdac1_sw,
                 .calmdac, .ph1, .ph2);

  adc_frontend_model #(.CAP_ERR(50), .FLASH_ERR(1000), .AMP_OFFSET(37)) u_fe (
    .clk, .rst_n, .ph1, .calmdac, .mdac1_sw, .vin,
    .therm0, .therm1, .therm2, .therm3, .therm4,
    .cyc, .sample, .n_flash_err, .n_phase_err);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- output checker (normal mode) ----------------
  bit  check_outputs = 0;
  bit  uncal = 0;
  int  n_uncal_err = 0, n_sat_hi = 0, n_sat_lo = 0, n_out = 0, n_contention = 0;

  function automatic int ideal_code(real v);
    int r;
    r = $rtoi(v + 262144.5) - 262144;  // round, v is never at a tie
    if (r < 0) return 0;
    if (r > 262143) return 65535;
    return r >>> 2;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #3;
    if ((dsp_oe & data_oe) != 0) n_contention++;
    // sample k is on the pins in cycles 2k+6 and 2k+7 (cyc already advanced)
    if (u_fe.started && check_outputs && cyc - 1 >= 6) begin
      int c, k, e;
      c = cyc - 1; k = (c - 6) / 2;
      e = ideal_code(u_fe.vin_of[k]);
      if (uncal) begin
        if (data_out != 16'(e)) n_uncal_err++;
      end else begin
        check(data_out == 16'(e), $sformatf("sample %0d vin=%f out=%0d expected %0d", k, u_fe.vin_of[k], data_out, e));
        n_out++;
        if (e == 65535 && u_fe.vin_of[k] > 262143.5) n_sat_hi++;
        if (e == 0 && u_fe.vin_of[k] < -0.5) n_sat_lo++;
      end
    end
  end

  // ---------------- DSP model ----------------
  // control pins: 15 OFF, 14 CLK, 13 INOUT
  task automatic dsp_pins(bit off, bit ck, bit io, logic [12:0] d, logic [12:0] d_oe);
    dsp_drv = {off, ck, io, d};
    dsp_oe  = {3'b111, d_oe};
  endtask

  task automatic wait_samples(int n);
    repeat (2 * n) @(posedge clk);
    #4;
  endtask

  int n_meas = 0, n_fuse_wr = 0, n_off_wr = 0, n_clear_seen = 0;

  // read the 8 measurement LSBs, twice, and require agreement
  task automatic measure_cap(int a, bit ck, output logic [7:0] v);
    logic [7:0] v2;
    dsp_pins(0, ck, 0, {5'(a), 8'h00}, 13'h1F00);
    wait_samples(10);
    v = data_out[7:0];
    wait_samples(1);
    v2 = data_out[7:0];
    check(v == v2, "repeatable measurement");
    check(data_oe == 16'h00FF, "measurement pin directions");
    if (calmdac) n_clear_seen++;
    n_meas++;
  endtask

  task automatic strobe(bit off, logic [12:0] d);
    dsp_pins(off, 0, 1, d, 13'h1FFF);
    @(posedge clk); #1;
    dsp_pins(off, 1, 1, d, 13'h1FFF);
    repeat (2) @(posedge clk); #1;
    dsp_pins(off, 0, 1, d, 13'h1FFF);
    @(posedge clk); #1;
  endtask

  // ramp the input by one step per sample, right after each sample is taken
  task automatic ramp(real lo, real hi, real step);
    vin = lo;
    while (vin <= hi) begin
      @(sample);
      vin = vin + step;
    end
  endtask

  logic [7:0] a_meas, b_meas;
  int err_meas [1:32];
  int off_meas;
  logic [12:0] off13;

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;

    // conversion before calibration: mismatch must show
    cal = 0;
    wait_samples(4);
    uncal = 1; check_outputs = 1;
    ramp(-3000.03125, 265000.0, 397.125);
    wait_samples(5);
    check_outputs = 0; uncal = 0;
    check(n_uncal_err > 0, "uncalibrated converter shows the capacitor errors");

    // calibration: base case and 32 capacitor steps
    vin = 100000.25;
    cal = 1;
    measure_cap(0, 1, a_meas);            // address 0, CLK high: no capacitor
    for (int m = 1; m <= 32; m++) begin
      measure_cap(m - 1, 0, b_meas);      // address m-1, CLK low: capacitor m
      err_meas[m] = int'($signed(8'(a_meas - b_meas)));
      check(err_meas[m] == u_fe.e_cap[m], $sformatf("measured error of C%0d = %0d, model %0d", m, err_meas[m], u_fe.e_cap[m]));
    end
    // program the fuse bank
    for (int m = 1; m <= 32; m++) begin
      strobe(0, {5'(m - 1), 1'b0, 7'(err_meas[m])});
      n_fuse_wr++;
    end
    dsp_pins(0, 0, 0, 13'h0, 13'h1F00);   // leave write mode with CLK low
    // offset measurement with the correction active, input at mid-scale
    vin = 131072.25;
    dsp_pins(1, 0, 0, 13'h0, 13'h0000);
    wait_samples(10);
    check(data_oe == 16'h1FFF, "offset measurement pin directions");
    check(!calmdac, "MDAC in normal sampling during offset measurement");
    off13 = data_out[12:0];
    off_meas = int'($signed(off13));
    check(off_meas == 37, $sformatf("measured offset %0d, model 37", off_meas));
    // program the offset fuse
    strobe(1, off13);
    n_off_wr++;
    dsp_pins(1, 0, 0, 13'h0, 13'h0000);
    @(posedge clk); #1;
    dsp_oe = 0; dsp_drv = 0;
    cal = 0;

    // calibrated conversion of a ramp wider than full scale
    wait_samples(4);
    check_outputs = 1;
    ramp(-3000.03125, 265000.0, 37.3125);
    wait_samples(5);
    check_outputs = 0;

    // every mechanism must have occurred
    check(n_meas == 33, "33 calibration measurements");
    check(n_clear_seen == 33, "correction register cleared / MDAC under DSP control");
    check(n_fuse_wr == 32, "32 fuse words written");
    check(n_off_wr == 1, "offset fuse written");
    check(n_sat_hi > 0, "over-range clamped to 65535");
    check(n_sat_lo > 0, "under-range clamped to 0");
    check(n_flash_err > 0, "first-flash errors corrected digitally");
    check(n_contention == 0, "no pin driven from both sides");
    check(n_phase_err == 0, "phase indicators alternate with the sample schedule");
    for (int i = 0; i < 33; i++) check(u_fe.seg_seen[i], $sformatf("residue segment %0d used", i));
    $display("mechanisms: measurements=%0d clears=%0d fuse_writes=%0d offset_writes=%0d clamp_hi=%0d clamp_lo=%0d flash_errors=%0d uncal_errors=%0d outputs=%0d",
             n_meas, n_clear_seen, n_fuse_wr, n_off_wr, n_sat_hi, n_sat_lo, n_flash_err, n_uncal_err, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
