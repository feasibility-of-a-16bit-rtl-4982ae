// phase_gen: two-phase clock generator of the pipeline.
//
// The converter runs on two alternating clock phases: in phase 1 the first
// MDAC amplifies while odd stages sample, in phase 2 the roles swap.  Each
// pipeline stage therefore has half a conversion period of latency.  In this
// synchronous implementation one cycle of `clk` is one phase, so `clk` runs
// at twice the sample rate (6 MHz for 3 MS/s) and the two phases are
// complementary one-cycle enables: ph1 is high in even cycles after reset,
// ph2 in odd ones.  The non-overlap gaps of the analog phase clocks are an
// analog timing matter and are not modelled; the phase enables are mutually
// exclusive by construction.  Using one fast clock with phase enables instead
// of two level-sensitive phase clocks is a choice of this implementation.
module phase_gen (
  input  logic clk,
  input  logic rst_n,
  output logic ph1,   // current cycle is phase 1
  output logic ph2    // current cycle is phase 2
);
  logic phase;  // 0: phase 1, 1: phase 2

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;

  assign ph1 = ~phase;
  assign ph2 = phase;

  assert property (@(posedge clk) ph1 ^ ph2);
endmodule
