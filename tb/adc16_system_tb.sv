// adc16_system_tb: end-to-end test of the converter with its calibration
// controller, every parameter at its default.
//
// The behavioural analog model (adc_frontend_model) supplies the comparator
// outputs: first-stage capacitor errors up to +-50 codes, first-flash
// threshold errors up to +-1000 codes, a 37-code amplifier offset and,
// during calibration, 4 codes (one output LSB) RMS of input noise.  The test
// set applies mid-scale (2^17) while the controller asks for it and an
// arbitrary level otherwise.
//
// Sequence: an uncalibrated ramp slightly wider than full scale (mismatch
// must show), a start pulse, the complete calibration by the controller
// (1024 readings per measurement), then a noise-free calibrated ramp.
// Checks: calibration length exactly 34 * (8 + 1024) + 99 samples; every
// fuse word within 1 code of the model's capacitor error and the offset
// fuse within 1 code of the amplifier offset; after calibration every
// output code within one LSB of clamp(round(vin)/4), in the two cycles
// three sample periods after the sample, and at least 99 % of them exact.
// Mechanisms counted, each of which must occur: capacitor measurements
// (distinct line selects),
// offset measurement with mid-scale request, fuse writes, offset write,
// register clears, clamping at both ends, absorbed first-flash errors.
module adc16_system_tb;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] therm0, therm1;
  logic [15:0] therm2, therm3, therm4;
  logic [15:0] code;
  logic [31:0] mdac1_sw;
  logic calmdac, ph1, ph2, vin_mid, busy, done;
  real  vin, vin_set = 0.0;
  int   cyc, sample, n_flash_err, n_phase_err;

  adc16_system dut (.clk, .rst_n, .start, .therm0, .therm1, .therm2, .therm3,
                    .therm4, .code, .mdac1_sw, .calmdac, .ph1, .ph2,
                    .vin_mid, .busy, .done);

  adc_frontend_model #(.CAP_ERR(50), .FLASH_ERR(1000), .AMP_OFFSET(37), .NMAX(60000)) u_fe (
    .clk, .rst_n, .ph1, .calmdac, .mdac1_sw, .vin,
    .therm0, .therm1, .therm2, .therm3, .therm4,
    .cyc, .sample, .n_flash_err, .n_phase_err);

  // test set: mid-scale on request, otherwise the level set by the sequence
  always_comb vin = vin_mid ? 131072.0 : vin_set;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- output checker ----------------
  bit check_outputs = 0, uncal = 0;
  int n_uncal_err = 0, n_out = 0, n_exact = 0, n_sat_hi = 0, n_sat_lo = 0;

  function automatic int ideal_code(real v);
    int r;
    r = $rtoi(v + 262144.5) - 262144;
    if (r < 0) return 0;
    if (r > 262143) return 65535;
    return r >>> 2;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #3;
    if (u_fe.started && check_outputs && cyc - 1 >= 6) begin
      int c, k, e, d;
      c = cyc - 1; k = (c - 6) / 2;
      e = ideal_code(u_fe.vin_of[k]);
      d = int'(code) - e;
      if (uncal) begin
        if (d != 0) n_uncal_err++;
      end else begin
        check(d >= -1 && d <= 1, $sformatf("sample %0d vin=%f out=%0d expected %0d", k, u_fe.vin_of[k], code, e));
        n_out++;
        if (d == 0) n_exact++;
        if (e == 65535 && u_fe.vin_of[k] > 262143.5) n_sat_hi++;
        if (e == 0 && u_fe.vin_of[k] < -0.5) n_sat_lo++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cap_meas = 0, n_ofs_meas = 0, n_fuse_wr = 0, n_off_wr = 0, n_clear = 0, n_mid = 0;
  logic prev_wrfuse = 0, prev_wroff = 0;
  io_mode_e prev_mode = IO_NORMAL;
  bit line_seen [33];
  always @(posedge clk) if (rst_n) begin
    io_mode_e md;
    md = dut.u_adc.mode;
    if (md == IO_MEAS_CAP && dut.u_adc.addr <= 32 && !line_seen[dut.u_adc.addr]) begin
      line_seen[dut.u_adc.addr] = 1;
      n_cap_meas++;
    end
    if (md == IO_MEAS_OFFS && prev_mode != IO_MEAS_OFFS) n_ofs_meas++;
    if (dut.u_adc.wrfuse && !prev_wrfuse) n_fuse_wr++;
    if (dut.u_adc.wroff && !prev_wroff) n_off_wr++;
    if (dut.u_adc.clrreg && ph1 && dut.u_adc.corr == '0) n_clear++;
    if (vin_mid) n_mid++;
    prev_mode   <= md;
    prev_wrfuse <= dut.u_adc.wrfuse;
    prev_wroff  <= dut.u_adc.wroff;
  end

  task automatic ramp(real lo, real hi, real step);
    vin_set = lo;
    while (vin_set <= hi) begin
      @(sample);
      vin_set = vin_set + step;
    end
    repeat (10) @(posedge clk);
  endtask

  int t0, t1;

  initial begin
    for (int i = 0; i < 33; i++) line_seen[i] = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (8) @(posedge clk);

    // uncalibrated
    uncal = 1; check_outputs = 1;
    ramp(-3000.03125, 265000.0, 397.125);
    check_outputs = 0;
    check(n_uncal_err > 0, "mismatch visible before calibration");

    // calibration by the controller
    u_fe.noise_rms = 4.0;
    vin_set = 100000.25;
    @(posedge clk); #1 start = 1;
    t0 = cyc;
    @(posedge done);
    t1 = cyc;
    #1 start = 0;
    check((t1 - t0) / 2 == 34 * (8 + 1024) + 99,
          $sformatf("calibration took %0d samples", (t1 - t0) / 2));
    for (int a = 0; a < 32; a++) begin
      int w;
      w = int'($signed(dut.u_adc.u_fuses.fuses[a]));
      check(w - u_fe.e_cap[a + 1] <= 1 && u_fe.e_cap[a + 1] - w <= 1,
            $sformatf("fuse %0d = %0d, capacitor error %0d", a, w, u_fe.e_cap[a + 1]));
    end
    begin
      int o;
      o = int'($signed(dut.u_adc.u_offset.offset));
      check(o >= 36 && o <= 38, $sformatf("offset fuse %0d, model 37", o));
    end
    u_fe.noise_rms = 0.0;
    repeat (20) @(posedge clk);
    check(!busy && !calmdac, "calibration mode left");

    // calibrated
    uncal = 0; check_outputs = 1;
    ramp(-3000.03125, 265000.0, 37.3125);
    check_outputs = 0;

    $display("mechanisms: cap_measurements=%0d offset_measurements=%0d midscale_samples=%0d fuse_writes=%0d offset_writes=%0d clears=%0d clamp_hi=%0d clamp_lo=%0d flash_errors=%0d uncal_errors=%0d outputs=%0d exact=%0d",
             n_cap_meas, n_ofs_meas, n_mid / 2, n_fuse_wr, n_off_wr, n_clear, n_sat_hi, n_sat_lo, n_flash_err, n_uncal_err, n_out, n_exact);
    check(n_cap_meas == 33, "33 line selects measured (base case and 32 capacitors)");
    check(n_ofs_meas == 1, "one offset measurement");
    check(n_mid > 0, "mid-scale requested");
    check(n_fuse_wr == 32, "32 fuse writes");
    check(n_off_wr == 1, "one offset write");
    check(n_clear > 0, "correction register cleared");
    check(n_sat_hi > 0 && n_sat_lo > 0, "clamping at both ends");
    check(n_flash_err > 0, "first-flash errors absorbed");
    check(n_out > 7000 && n_exact * 100 >= n_out * 99, "calibrated outputs exact");
    check(n_phase_err == 0, "phase schedule");
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
