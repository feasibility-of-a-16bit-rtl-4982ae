// flash_delay_correct_tb: feeds random flash words with the pipeline timing
// of the converter (flash s of sample k in phase cycle 2k+s, random values in
// the other phase) and checks that
// sel carries the sample's first-stage word 4 cycles and raw the
// overlap-added sum of its words 5 cycles after flash 0 was presented.
module flash_delay_correct_tb;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ph1, ph2;
  logic [5:0] f0, f1;
  logic [4:0] f2, f3, f4;
  logic signed [RAW_W-1:0] raw;
  logic [5:0] sel;
  int checks = 0, failures = 0;

  localparam int NS = 64;
  int w [NS][5];

  phase_gen u_ph (.clk, .rst_n, .ph1, .ph2);
  flash_delay_correct dut (.clk, .rst_n, .ph1,
    .flash0(f0), .flash1(f1), .flash2(f2), .flash3(f3), .flash4(f4), .raw, .sel);

  always #5 clk = ~clk;

  function automatic int expect_raw(int k);
    return w[k][0] * 8192 + w[k][1] * 512 + w[k][2] * 64 + w[k][3] * 8 + w[k][4];
  endfunction

  initial begin
    for (int k = 0; k < NS; k++) begin
      w[k][0] = int'($urandom_range(0, 32)) - 2;
      w[k][1] = $urandom_range(14, 46);
      w[k][2] = $urandom_range(6, 22);
      w[k][3] = $urandom_range(6, 22);
      w[k][4] = $urandom_range(8, 24);
    end
    w[0] = '{-2, 14, 6, 6, 8};     // lowest codes
    w[1] = '{14, 30, 14, 14, 16};  // centre of every flash: 2^17
    w[2] = '{30, 46, 22, 22, 24};  // highest codes
    f0 = 0; f1 = 0; f2 = 0; f3 = 0; f4 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // cycle c = 0 is a phase-1 cycle
    for (int c = 0; c < 2 * NS + 12; c++) begin
      // present words for this cycle: flash s of sample k only in cycle
      // 2k+s, random values in the other phase, so the delay depth of
      // every word is checked to the phase
      f0 = 6'($urandom); f1 = 6'($urandom);
      f2 = 5'($urandom); f3 = 5'($urandom); f4 = 5'($urandom);
      if (c % 2 == 0 && c / 2 < NS)                    f0 = 6'(w[c/2][0]);
      if (c >= 1 && (c-1) % 2 == 0 && (c-1)/2 < NS)    f1 = 6'(w[(c-1)/2][1]);
      if (c >= 2 && (c-2) % 2 == 0 && (c-2)/2 < NS)    f2 = 5'(w[(c-2)/2][2]);
      if (c >= 3 && (c-3) % 2 == 0 && (c-3)/2 < NS)    f3 = 5'(w[(c-3)/2][3]);
      if (c >= 4 && (c-4) % 2 == 0 && (c-4)/2 < NS)    f4 = 5'(w[(c-4)/2][4]);
      // result of sample k is visible during cycle 2k+5
      if (c >= 5 && (c-5) % 2 == 0 && (c-5)/2 < NS) begin
        int k;
        k = (c-5)/2;
        checks++;
        if (raw != RAW_W'(expect_raw(k))) begin
          failures++;
          $display("FAIL sample %0d raw=%0d expected %0d", k, raw, expect_raw(k));
        end
      end
      // first-stage word of sample k is on sel during cycle 2k+4
      if (c >= 4 && (c-4) % 2 == 0 && (c-4)/2 < NS) begin
        int k;
        k = (c-4)/2;
        checks++;
        if ($signed(sel) != w[k][0]) begin
          failures++;
          $display("FAIL sample %0d sel=%0d expected %0d", k, $signed(sel), w[k][0]);
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (expect_raw(1) != 131072) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
