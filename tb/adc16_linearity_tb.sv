// adc16_linearity_tb: the linearity experiment.  The converter is
// calibrated by its calibration controller with measurement noise present,
// and DNL/INL are measured over a 2^20-sample input ramp before and after
// calibration.  All design parameters are at their defaults.
//
// The analog model has capacitor mismatch of up to +-50 codes (18-bit
// units), first-flash threshold errors of up to +-1000 codes, a 37-code
// amplifier offset, and stage-2 step errors of up to +-0.25 codes that make
// the back-end slightly non-linear, so the calibration measurements are only
// as good as the back-end.  During calibration the model adds 4 codes RMS of
// input-referred noise (one 16-bit LSB), and the controller averages 1024
// readings per measurement.  The test set applies mid-scale when the
// controller asks for it.  The ramp then runs noise-free from 2048 codes
// below to 2048 codes above full scale in 2^20 samples (about 16 per output
// code).  The output histogram gives DNL and end-point INL of codes
// 1..65534 in 16-bit LSBs.
// Checks: every fuse word within 5 codes of the model's capacitor error,
// the offset fuse within 2 codes, and after calibration no missing code,
// |DNL| <= 0.35 LSB (0.25 LSB target plus histogram resolution) and
// |INL| <= 1 LSB; before calibration missing codes must be present.
module adc16_linearity_tb;
  import adc_pkg::*;

  localparam int N_RAMP  = 1 << 20;
  localparam int NCODES  = 65536;

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

  adc_frontend_model #(.CAP_ERR(50), .FLASH_ERR(1000), .AMP_OFFSET(37),
                       .STAGE2_ERR(0.25), .NOISE_RMS(0.0)) u_fe (
    .clk, .rst_n, .ph1, .calmdac, .mdac1_sw, .vin,
    .therm0, .therm1, .therm2, .therm3, .therm4,
    .cyc, .sample, .n_flash_err, .n_phase_err);

  // test set: mid-scale on request, otherwise the level set by the sequence
  always_comb vin = vin_mid ? 131072.0 : vin_set;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- histogram of the output codes of a ramp ----------------
  int hist [NCODES];
  int collect_from = 1 << 30, collect_to = 1 << 30;

  always @(posedge clk) if (rst_n && u_fe.started) begin
    #3;
    // sample k is on the pins in cycles 2k+6 and 2k+7; count it once
    if (cyc - 1 >= 6 && (cyc - 1 - 6) % 2 == 0) begin
      int k;
      k = (cyc - 1 - 6) / 2;
      if (k >= collect_from && k <= collect_to) hist[code]++;
    end
  end

  task automatic wait_samples(int n);
    repeat (2 * n) @(posedge clk);
    #4;
  endtask

  task automatic ramp_histogram(output real dnl_max, output real inl_max, output int missing);
    real lo, hi, step, mean, inl;
    for (int c = 0; c < NCODES; c++) hist[c] = 0;
    lo = -2048.0; hi = 262144.0 + 2048.0;
    step = (hi - lo) / N_RAMP;
    vin_set = lo;
    collect_from = sample + 1;
    collect_to = 1 << 30;
    for (int i = 0; i < N_RAMP; i++) begin
      @(sample);
      vin_set = vin_set + step;
    end
    collect_to = sample;
    wait_samples(6);
    // ideal count per code: 4 raw codes per output code
    mean = 4.0 / step;
    dnl_max = 0.0; inl_max = 0.0; inl = 0.0; missing = 0;
    for (int c = 1; c < NCODES - 1; c++) begin
      real d;
      d = hist[c] / mean - 1.0;
      if (hist[c] == 0) missing++;
      if (d > dnl_max) dnl_max = d;
      if (-d > dnl_max) dnl_max = -d;
      inl = inl + d;
      if (inl > inl_max) inl_max = inl;
      if (-inl > inl_max) inl_max = -inl;
    end
  endtask

  real dnl_u, inl_u, dnl_c, inl_c;
  int  miss_u, miss_c;

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wait_samples(4);

    // uncalibrated linearity
    ramp_histogram(dnl_u, inl_u, miss_u);
    $display("before calibration: max|DNL| = %0.3f LSB, max|INL| = %0.3f LSB, missing codes = %0d", dnl_u, inl_u, miss_u);
    check(miss_u > 0, "uncalibrated converter has missing codes");

    // calibration by the controller, with noise
    u_fe.noise_rms = 4.0;
    vin_set = 100000.25;
    @(posedge clk); #1 start = 1;
    @(posedge done);
    #1 start = 0;
    for (int a = 0; a < 32; a++) begin
      int w;
      w = int'($signed(dut.u_adc.u_fuses.fuses[a]));
      check(w - u_fe.e_cap[a + 1] <= 5 && u_fe.e_cap[a + 1] - w <= 5,
            $sformatf("fuse %0d = %0d, capacitor error %0d", a, w, u_fe.e_cap[a + 1]));
    end
    begin
      int o;
      o = int'($signed(dut.u_adc.u_offset.offset));
      check(o >= 35 && o <= 39, $sformatf("offset fuse %0d, model 37", o));
    end
    u_fe.noise_rms = 0.0;
    wait_samples(4);
    check(!busy && !calmdac, "calibration mode left");

    // calibrated linearity
    ramp_histogram(dnl_c, inl_c, miss_c);
    $display("after calibration:  max|DNL| = %0.3f LSB, max|INL| = %0.3f LSB, missing codes = %0d", dnl_c, inl_c, miss_c);
    check(miss_c == 0, "no missing codes after calibration");
    check(dnl_c <= 0.35, "DNL within 0.25 LSB plus histogram resolution");
    check(inl_c <= 1.0, "INL within 1 LSB");
    check(n_phase_err == 0, "phase schedule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
