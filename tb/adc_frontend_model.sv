// adc_frontend_model: behavioural model of the analog section of the 16-bit
// 5-5-4-4-4 pipeline ADC, for testbenches only.
//
// All voltages are in 18-bit code units: full scale is 0..262144 and one
// first-stage LSB is 8192.  The model produces the latched comparator
// outputs of the five flashes with the pipeline timing of the converter:
// the first flash decides on sample k in the k-th phase-1 cycle after reset,
// flash s one phase later than flash s-1, and every flash holds its decision
// for two phase cycles.
//
// Stage 1: 32 comparators at (m-0.5)*8192 + fe[m] (threshold errors fe);
// the MDAC subtracts, for every unit capacitor whose switch control from the
// design is high, a step of 8192 + e_cap[m] (capacitor mismatch), adds
// 16384 and the amplifier offset AMP_OFFSET.  With calmdac high it samples
// the first decision level (4096) instead of the input.  Stages 2..5 are
// ideal quantizers with 32/16/16/16 comparators whose residues fit the ROM
// coding of the design, except for optional random step errors of the
// stage-2 capacitors (up to +-STAGE2_ERR codes).  Gaussian input-referred
// noise of NOISE_RMS codes is added to every sample; a testbench may change
// the level at run time through the variable noise_rms.  The input is the real
// port vin; the value used for sample k is kept in vin_of[k].
module adc_frontend_model #(
  parameter int  CAP_ERR    = 50,     // max |e_cap|, codes
  parameter int  FLASH_ERR  = 1000,   // max |fe|, codes
  parameter int  AMP_OFFSET = 37,     // residue amplifier offset, codes
  parameter real STAGE2_ERR = 0.0,    // max |stage-2 step error|, codes
  parameter real NOISE_RMS  = 0.0,    // input-referred noise, codes
  parameter int  NMAX       = 40000   // samples recorded
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph1,
  input  logic        calmdac,
  input  logic [31:0] mdac1_sw,
  input  real         vin,
  output logic [31:0] therm0,
  output logic [31:0] therm1,
  output logic [15:0] therm2,
  output logic [15:0] therm3,
  output logic [15:0] therm4,
  output int          cyc,          // phase cycles since the first phase-1 cycle
  output int          sample,       // sample taken in the latest phase-1 cycle
  output int          n_flash_err,  // samples whose first-flash level was not the ideal one
  output int          n_phase_err   // ph1 out of step with the sample schedule
);
  int  e_cap [1:32];
  real fe    [1:32];
  real e2    [1:32];
  real vin_of [NMAX];
  bit  seg_seen [33];
  int  th2 [NMAX], th3 [NMAX], th4 [NMAX];
  logic [31:0] t1 [NMAX];
  bit  started = 0;
  real noise_rms = NOISE_RMS;

  initial begin
    therm0 = 0; therm1 = 0; therm2 = 0; therm3 = 0; therm4 = 0;
    cyc = 0; sample = 0; n_flash_err = 0; n_phase_err = 0;
    for (int m = 1; m <= 32; m++) begin
      int r;
      e_cap[m] = int'($urandom_range(0, 2 * CAP_ERR)) - CAP_ERR;
      r = int'($urandom_range(0, 2 * FLASH_ERR)) - FLASH_ERR;
      fe[m] = r;
      r = int'($urandom_range(0, 2000)) - 1000;
      e2[m] = STAGE2_ERR * r / 1000.0;
    end
  end

  function automatic logic [31:0] therm_of(int n);
    return (n >= 32) ? '1 : ((32'd1 << n) - 1);
  endfunction

  // comparators k = 1..comps at (k+bias-0.5)*w
  function automatic int quant(real r, int comps, int bias, int w);
    int n = 0;
    for (int k = 1; k <= comps; k++) if (r > (k + bias - 0.5) * w) n++;
    return n;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom / 4294967296.0;
    return s - 6.0;
  endfunction

  task automatic convert(int k);
    real r1, r2, r3, r4, r5;
    int n0, n1, n2, n3, n4;
    r1 = vin + noise_rms * gauss();
    if (k < NMAX) vin_of[k] = vin;
    n0 = 0;
    for (int m = 1; m <= 32; m++) if (r1 > (m - 0.5) * 8192.0 + fe[m]) n0++;
    if (n0 != quant(r1, 32, 0, 8192)) n_flash_err++;
    therm0 = therm_of(n0);
    #1;  // switch controls follow therm0 combinationally
    r2 = (calmdac ? 4096.0 + noise_rms * gauss() : r1) + 16384.0 + AMP_OFFSET;
    for (int m = 1; m <= 32; m++) if (mdac1_sw[m-1]) r2 -= 8192.0 + e_cap[m];
    n1 = quant(r2, 32, 16, 512);  r3 = r2 - (n1 + 14) * 512.0;
    for (int m = 1; m <= n1; m++) r3 -= e2[m];
    n2 = quant(r3, 16, 8, 64);    r4 = r3 - (n2 + 6) * 64.0;
    n3 = quant(r4, 16, 8, 8);     r5 = r4 - (n3 + 6) * 8.0;
    n4 = quant(r5, 16, 8, 1);
    t1[k % NMAX] = therm_of(n1); th2[k % NMAX] = n2; th3[k % NMAX] = n3; th4[k % NMAX] = n4;
    if (!calmdac) seg_seen[n0] = 1;
  endtask

  // flash s of sample k in cycle 2k+s
  always @(posedge clk) if (rst_n) begin
    #1;
    if (!started && ph1) started = 1;
    if (started) begin
      int k;
      k = cyc / 2;
      if (ph1 != (cyc % 2 == 0)) n_phase_err++;
      if (cyc % 2 == 0) begin
        if (k >= 1) therm2 = 16'(therm_of(th2[(k-1) % NMAX]));
        if (k >= 2) therm4 = 16'(therm_of(th4[(k-2) % NMAX]));
        convert(k);
        sample = k;
      end else begin
        therm1 = t1[k % NMAX];
        if (k >= 1) therm3 = 16'(therm_of(th3[(k-1) % NMAX]));
      end
      cyc++;
    end
  end
endmodule
